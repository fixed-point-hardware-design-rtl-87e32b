// remap_multiply: one k_z output point of the Stolt remapping.
//
// Given the two spectrum samples that bracket the fractional frequency
// position f_mig (v0 at bin floor(f_mig), v1 at the next bin) and the
// fractional part of f_mig (the low 12 bits of the unsigned Q12.12 map word
// M), it forms the linear interpolation v0 + (v1 - v0)*frac and multiplies
// the result by the Q1.14 scaler A. Real and imaginary parts are handled
// alike. Products are rounded to nearest (stolt_pkg::sra_round), which is
// this design's choice. The caller fetches v0 and v1 from the equalised f-axis
// column and passes zero for bins that lie past the end of the column.
//
// Interface: in_valid with operands -> out_valid with the product, two
// register stages (latency 2 cycles), one point per cycle.
module remap_multiply
  import stolt_pkg::*; #(
  parameter int unsigned W  = 16,   // data word (Q1.14)
  parameter int unsigned FR = 14,   // fraction bits of data and A
  parameter int unsigned MF = 12    // fraction bits of the map position
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] v0_re,
  input  logic signed [W-1:0] v0_im,
  input  logic signed [W-1:0] v1_re,
  input  logic signed [W-1:0] v1_im,
  input  logic [MF-1:0]       frac,
  input  logic signed [W-1:0] a,
  output logic                out_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  logic                   v1;
  logic signed [W+1:0]    ip_re, ip_im;   // interpolated value
  logic signed [W-1:0]    a_r;

  function automatic logic signed [W+1:0] interp(input logic signed [W-1:0] p0,
                                                 input logic signed [W-1:0] p1,
                                                 input logic [MF-1:0] f);
    logic signed [W:0]      d;
    logic signed [W+MF+1:0] m;
    d = (W+1)'(p1) - (W+1)'(p0);
    m = (W+MF+2)'(d) * $signed({1'b0, f});
    return (W+2)'(p0) + (W+2)'(sra_round(48'(m), MF));
  endfunction

  function automatic logic signed [W-1:0] mul_sat(input logic signed [W+1:0] x,
                                                  input logic signed [W-1:0] s);
    logic signed [2*W+1:0] m;
    m = (2*W+2)'(x) * (2*W+2)'(s);
    m = (2*W+2)'(sra_round(48'(m), FR));
    if (m > (2*W+2)'((1 << (W-1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (m < -(2*W+2)'(1 << (W-1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    ip_re  <= interp(v0_re, v1_re, frac);
    ip_im  <= interp(v0_im, v1_im, frac);
    a_r    <= a;
    out_re <= mul_sat(ip_re, a_r);
    out_im <= mul_sat(ip_im, a_r);
  end
endmodule
