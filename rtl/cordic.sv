// cordic: sine and cosine by the CORDIC rotation algorithm in integer
// arithmetic.
//
// Angles are in degrees scaled by 2048 (2^11, twelve bits of precision). The
// vector starts at (X, Y) = (0.60725 * 2048, 0) = (1244, 0), which already
// includes the CORDIC gain correction for twelve steps, and the residual
// angle A starts at the requested angle. Step i rotates by +-atan(2^-i):
//   A >= 0:  X = X - (Y >>> i), Y = Y + (X >>> i), A = A - atan_i
//   A <  0:  X = X + (Y >>> i), Y = Y - (X >>> i), A = A + atan_i
// where atan_i = round(2048 * atan(2^-i) in degrees) comes from a 12-entry
// look-up table. After ITER steps Y holds 2048*sin and X 2048*cos of the
// angle. Valid angles are -90..+90 degrees.
//
// The table contents, the initial X and the twelve steps follow the design;
// the angle register width (ANG_W = 20 bits, enough for +-90 degrees * 2048 =
// +-184320) is this implementation's choice, X and Y use the design's 16
// bits.
//
// Timing: one step per clock. start is sampled when idle; done pulses for one
// cycle ITER+1 cycles later. Results hold until the next start.
module cordic #(
  parameter int unsigned ITER  = 12,
  parameter int unsigned XY_W  = 16,
  parameter int unsigned ANG_W = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic signed [ANG_W-1:0] angle,
  output logic signed [XY_W-1:0]  sin_out,
  output logic signed [XY_W-1:0]  cos_out,
  output logic                    busy,
  output logic                    done
);

  // round(2048 * atan(2^-i)), degrees
  localparam int ATAN_TAB [12] = '{92160, 54405, 28746, 14592, 7324, 3664,
                                   1833, 917, 459, 230, 115, 57};
  localparam int X_INIT = 1244;   // 0.60725 * 2048

  logic signed [XY_W-1:0]  x, y;
  logic signed [ANG_W-1:0] a;
  logic [$clog2(ITER+1)-1:0] i;
  logic                      run;

  logic signed [XY_W-1:0]  dx, dy;
  logic signed [ANG_W-1:0] da;

  assign dx = x >>> i;
  assign dy = y >>> i;
  assign da = (i < 12) ? ANG_W'(ATAN_TAB[i]) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      x    <= '0;
      y    <= '0;
      a    <= '0;
      i    <= '0;
      run  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          x   <= XY_W'(X_INIT);
          y   <= '0;
          a   <= angle;
          i   <= '0;
          run <= 1'b1;
        end
      end else begin
        if (!a[ANG_W-1]) begin
          x <= x - dy;
          y <= y + dx;
          a <= a - da;
        end else begin
          x <= x + dy;
          y <= y - dx;
          a <= a + da;
        end
        i <= i + 1'b1;
        if (32'(i) == ITER - 1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sin_out = y;
  assign cos_out = x;
  assign busy    = run;

endmodule
