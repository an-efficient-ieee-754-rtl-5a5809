// nrd_divider: sequential non-restoring divider.
//
// Registers A (partial remainder, signed), Q (dividend, becoming the
// quotient) and M (divisor). The dividend is {a_init, q_init}; a_init must be
// smaller than the divisor (a_init = 0 gives a plain N-bit by N-bit
// division). Each of the N iterations takes three clock cycles, one per step
// of the algorithm:
//   phase 0  shift A and Q left together by one bit
//   phase 1  A >= 0 ? A = A - M : A = A + M
//   phase 2  set the new quotient bit q0 = ~sign(A)
// After the last iteration one more cycle adds M back to a negative A to
// give the true remainder. Restoration inside the loop is never needed.
//
// Timing: `start` is sampled while idle and loads the registers; the N
// iterations then take 3*N cycles (72 for N = 24) and the correction one
// more, after which `done` is high for one cycle with quotient and
// remainder valid (they hold until the next start). Three cycles per
// iteration is this implementation's reading of the design's 72-cycle
// divide.
module nrd_divider #(
  parameter int unsigned N = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] a_init,
  input  logic [N-1:0] q_init,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         busy,
  output logic         done
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIX} state_e;

  localparam int unsigned AW = N + 2;

  state_e                 state;
  logic [1:0]             phase;
  logic [$clog2(N+1)-1:0] count;
  logic signed [AW-1:0]   a;
  logic [N-1:0]           q;
  logic [N-1:0]           m;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      phase <= '0;
      count <= '0;
      a     <= '0;
      q     <= '0;
      m     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a     <= AW'(a_init);
          q     <= q_init;
          m     <= divisor;
          phase <= '0;
          count <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          unique case (phase)
            2'd0: begin
              {a, q} <= {a[AW-2:0], q, 1'b0};
              phase  <= 2'd1;
            end
            2'd1: begin
              a     <= a[AW-1] ? a + AW'(m) : a - AW'(m);
              phase <= 2'd2;
            end
            default: begin
              q[0]  <= ~a[AW-1];
              phase <= 2'd0;
              count <= count + 1'b1;
              if (32'(count) == N - 1) state <= S_FIX;
            end
          endcase
        end
        S_FIX: begin
          if (a[AW-1]) a <= a + AW'(m);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign quotient  = q;
  assign remainder = a[N-1:0];
  assign busy      = (state != S_IDLE);

endmodule
