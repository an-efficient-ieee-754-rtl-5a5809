// nr_sqrt: sequential non-restoring integer square root.
//
// Computes root = floor(sqrt(radicand)) and remainder = radicand - root^2 for
// a 2*ROOT_W-bit radicand. The partial remainder R is kept in two's
// complement and is never restored: each iteration brings down the next two
// radicand bits and then subtracts (Q<<2)|1 when R >= 0 or adds (Q<<2)|3
// when R < 0; the new root bit is 1 exactly when the new R is >= 0. A final
// step adds (Q<<1)|1 to a negative R to obtain the true remainder. Each
// iteration takes three clock cycles:
//   phase 0  R = (R << 2) | next two radicand bits
//   phase 1  R = R - ((Q<<2)|1)  or  R + ((Q<<2)|3)
//   phase 2  Q = (Q << 1) | (R >= 0)
// The three-cycle iteration is this implementation's choice, matching the
// divider.
//
// Parameter ROOT_W: root width (default 16, a 32-bit radicand).
// Timing: start is sampled when idle; done pulses one cycle after the
// 3*ROOT_W iteration cycles and the correction cycle. Outputs hold until
// the next start.
module nr_sqrt #(
  parameter int unsigned ROOT_W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [2*ROOT_W-1:0] radicand,
  output logic [ROOT_W-1:0]   root,
  output logic [ROOT_W:0]     remainder,
  output logic                busy,
  output logic                done
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIX} state_e;

  localparam int unsigned RW = ROOT_W + 4;

  state_e                      state;
  logic [1:0]                  phase;
  logic [$clog2(ROOT_W+1)-1:0] count;
  logic signed [RW-1:0]        r;
  logic [ROOT_W-1:0]           q;
  logic [2*ROOT_W-1:0]         d;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      phase <= '0;
      count <= '0;
      r     <= '0;
      q     <= '0;
      d     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r     <= '0;
          q     <= '0;
          d     <= radicand;
          phase <= '0;
          count <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          unique case (phase)
            2'd0: begin
              r     <= {r[RW-3:0], d[2*ROOT_W-1 -: 2]};
              d     <= d << 2;
              phase <= 2'd1;
            end
            2'd1: begin
              if (!r[RW-1]) r <= r - RW'({q, 2'b01});
              else          r <= r + RW'({q, 2'b11});
              phase <= 2'd2;
            end
            default: begin
              q     <= {q[ROOT_W-2:0], ~r[RW-1]};
              phase <= 2'd0;
              count <= count + 1'b1;
              if (32'(count) == ROOT_W - 1) state <= S_FIX;
            end
          endcase
        end
        S_FIX: begin
          if (r[RW-1]) r <= r + RW'({q, 1'b1});
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign root      = q;
  assign remainder = r[ROOT_W:0];
  assign busy      = (state != S_IDLE);

endmodule
