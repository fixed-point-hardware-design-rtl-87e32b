// cordic_rotator: pipelined CORDIC phase rotation, out = in * exp(j*pi*phase).
//
// The phase arrives as a signed Q3.12 number in units of pi (so +-2.0 means
// +-2*pi, matching the document's R input range). Because the rotation is
// periodic in 2*pi, only the low 13 bits are kept, giving a phase in [-1, 1).
// A first stage folds phases with |phase| >= 1/2 into (-1/2, 1/2) by adding
// or subtracting a half turn and negating I and Q, as in the document's
// CORDIC flow chart. NITER shift-add stages follow: in stage i, d = -1 when
// the residual phase is negative and +1 otherwise, phase -= d*atan(2^-i)/pi,
// I -= d*Q*2^-i, Q += d*I*2^-i. A last stage removes the CORDIC gain by a
// constant multiplication with 1/K = 0.60725 (Q0.16) and truncates back to
// the data format; the result is saturated to the W-bit word.
//
// The number of iterations, the guard bits and the gain correction are this
// design's choices; the document gives the flow chart but not these values.
//
// Interface: in_valid/in_re/in_im/in_phase -> out_valid/out_re/out_im, fully
// pipelined, one sample per cycle, latency NITER + 2 cycles.
module cordic_rotator #(
  parameter int unsigned W     = 16,   // data word (Q1.14)
  parameter int unsigned NITER = 14    // shift-add iterations
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic signed [15:0]  in_phase,   // Q3.12, units of pi
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  localparam int unsigned G   = 4;          // guard fraction bits
  localparam int unsigned IW  = W + 2 + G;  // growth up to 1.65*sqrt(2)
  localparam int unsigned PW  = 24;         // phase: Q3.20, units of pi
  localparam int unsigned PF  = 20;
  localparam int unsigned KINV = 39797;     // round(2^16 / 1.6467602581)

  logic signed [PW-1:0] atan_t [NITER];
  initial begin
    for (int i = 0; i < int'(NITER); i++)
      atan_t[i] = PW'($rtoi($floor($atan(2.0 ** (-i)) / 3.14159265358979323846 * (2.0 ** PF) + 0.5)));
  end

  logic                 v  [NITER+1];
  logic signed [IW-1:0] xi [NITER+1];
  logic signed [IW-1:0] yi [NITER+1];
  logic signed [PW-1:0] zi [NITER+1];

  // stage 0: reduce to [-1,1) and fold into (-1/2, 1/2)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    logic signed [12:0]   p13;
    logic signed [PW-1:0] p;
    logic signed [IW-1:0] x, y;
    p13 = in_phase[12:0];
    p   = PW'(p13) <<< (PF - 12);
    x   = IW'(in_re) <<< G;
    y   = IW'(in_im) <<< G;
    if (p >= (PW'(1) <<< (PF-1))) begin
      zi[0] <= p - (PW'(1) <<< PF);
      xi[0] <= -x; yi[0] <= -y;
    end else if (p <= -(PW'(1) <<< (PF-1))) begin
      zi[0] <= p + (PW'(1) <<< PF);
      xi[0] <= -x; yi[0] <= -y;
    end else begin
      zi[0] <= p; xi[0] <= x; yi[0] <= y;
    end
  end

  for (genvar i = 0; i < int'(NITER); i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[i+1] <= 1'b0;
      else        v[i+1] <= v[i];
    end
    always_ff @(posedge clk) begin
      if (zi[i] < 0) begin          // d = -1
        zi[i+1] <= zi[i] + atan_t[i];
        xi[i+1] <= xi[i] + (yi[i] >>> i);
        yi[i+1] <= yi[i] - (xi[i] >>> i);
      end else begin                // d = +1
        zi[i+1] <= zi[i] - atan_t[i];
        xi[i+1] <= xi[i] - (yi[i] >>> i);
        yi[i+1] <= yi[i] + (xi[i] >>> i);
      end
    end
  end

  // gain correction and output
  function automatic logic signed [W-1:0] scale_out(input logic signed [IW-1:0] a);
    logic signed [IW+17:0] m;
    logic signed [IW+17:0] r;
    m = (IW+18)'(a) * $signed({1'b0, 17'(KINV)});
    r = m >>> (16 + G);
    if (r > (IW+18)'((1 << (W-1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (r < -(IW+18)'(1 << (W-1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v[NITER];
  end
  always_ff @(posedge clk) begin
    out_re <= scale_out(xi[NITER]);
    out_im <= scale_out(yi[NITER]);
  end
endmodule
