// magnitude: pipelined envelope |H| = sqrt(re^2 + im^2).
//
// The squared magnitude (2W bits, unsigned) is formed in the first stage;
// W further stages each decide one bit of the integer square root with the
// classic digit-by-digit method (compare the remainder with root + bit,
// subtract if it fits). Because re and im carry FR fraction bits, their
// squares carry 2*FR and the root again carries FR, so the result is in the
// same fixed-point format as the inputs (Q1.22 for the document's 24-bit H).
// The result is the floor of the exact root. The document only says that the
// absolute values are computed; the digit-by-digit square root is this
// design's choice.
//
// Interface: in_valid/re/im -> out_valid/mag, one sample per cycle, latency
// W + 1 cycles.
module magnitude #(
  parameter int unsigned W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic                out_valid,
  output logic [W-1:0]        mag
);
  localparam int unsigned SW = 2 * W;

  logic          v   [W+1];
  logic [SW-1:0] op  [W+1];
  logic [SW-1:0] res [W+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    logic signed [SW-1:0] r2, i2;
    r2 = SW'(re) * SW'(re);
    i2 = SW'(im) * SW'(im);
    op[0]  <= SW'(r2) + SW'(i2);
    res[0] <= '0;
  end

  for (genvar k = 0; k < int'(W); k++) begin : g_bit
    localparam logic [SW-1:0] ONE = SW'(1) << (SW - 2 - 2*k);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[k+1] <= 1'b0;
      else        v[k+1] <= v[k];
    end
    always_ff @(posedge clk) begin
      if (op[k] >= res[k] + ONE) begin
        op[k+1]  <= op[k] - (res[k] + ONE);
        res[k+1] <= (res[k] >> 1) + ONE;
      end else begin
        op[k+1]  <= op[k];
        res[k+1] <= res[k] >> 1;
      end
    end
  end

  assign out_valid = v[W];
  assign mag       = W'(res[W]);
endmodule
