// tb_compounding: five compounding passes at NT_FFT = 16, NX = 4 against
// values worked out in the testbench: K larger-scaled than C, C
// larger-scaled than K, two passes entered with the overflow flag set (C
// must be halved; in the second the overflowed C sets the common factor),
// and a pass whose sums exceed [-1, 1] (saturation and of_out).
// The expected sum is (C >> (T - c_s)) + (K*2^8 >> (T - s_k)) with
// T = max(s_k, c_s + of), saturated to 24 bits. Also checks the pass length.
module tb_compounding;
  import stolt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NT = 16, NXF = 8, NX = 4, NTH = NT/2, TOT = NTH*NX;

  logic start, busy, done, of_in, of_out, c_ren, c_we;
  scale_t s_k, c_s_in, c_s_out;
  logic [$clog2(NTH)-1:0] k_row; logic [$clog2(NXF)-1:0] k_col;
  logic signed [15:0] k_re, k_im;
  logic [$clog2(TOT)-1:0] c_raddr, c_waddr;
  logic signed [23:0] c_rq_re, c_rq_im, c_wd_re, c_wd_im;

  compounding #(.NT_FFT(NT), .NX_FFT(NXF), .NX(NX)) dut (.*);

  logic signed [15:0] kre [NTH][NXF], kim [NTH][NXF];
  logic signed [23:0] cre [TOT], cim [TOT];
  always_ff @(posedge clk) begin
    k_re <= kre[k_row][k_col]; k_im <= kim[k_row][k_col];
    if (c_ren) begin c_rq_re <= cre[c_raddr]; c_rq_im <= cim[c_raddr]; end
    if (c_we)  begin cre[c_waddr] <= c_wd_re; cim[c_waddr] <= c_wd_im; end
  end

  function automatic longint sra(longint v, int s);
    if (s == 0) return v;
    return (s > 46) ? 0 : ((v + (64'sd1 <<< (s - 1))) >>> s);   // round to nearest
  endfunction
  function automatic longint sat(longint v);
    return v > 8388607 ? 8388607 : (v < -8388608 ? -8388608 : v);
  endfunction

  task automatic pass(input int sk, input int cs, input int of, input bit big, input int exp_of);
    longint er [TOT], ei [TOT];
    int t, cyc; bit anyof;
    t = (sk > cs + of) ? sk : cs + of;
    anyof = 0;
    for (int x = 0; x < NX; x++)
      for (int k = 0; k < NTH; k++) begin
        int a; longint vr, vi;
        a = x*NTH + k;
        kre[k][x] = big ? 16'sd16000 : 16'(int'($urandom_range(0, 32768)) - 16384);
        kim[k][x] = big ? -16'sd16000 : 16'(int'($urandom_range(0, 32768)) - 16384);
        if (big) begin cre[a] = 24'sd4100000; cim[a] = -24'sd4100000; end
        else begin
          cre[a] = 24'(int'($urandom_range(0, 1 << 23)) - (1 << 22));
          cim[a] = 24'(int'($urandom_range(0, 1 << 23)) - (1 << 22));
        end
        vr = sra(longint'(cre[a]), t - cs) + sra(longint'(kre[k][x]) * 256, t - sk);
        vi = sra(longint'(cim[a]), t - cs) + sra(longint'(kim[k][x]) * 256, t - sk);
        if (vr > 4194304 || vr < -4194304 || vi > 4194304 || vi < -4194304) anyof = 1;
        er[a] = sat(vr); ei[a] = sat(vi);
      end
    @(negedge clk);
    s_k = scale_t'(sk); c_s_in = scale_t'(cs); of_in = of[0]; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != TOT + 3) begin failures++; $display("FAIL pass length %0d", cyc); end
    checks++;
    if (int'(c_s_out) != t) begin failures++; $display("FAIL c_s_out %0d exp %0d", c_s_out, t); end
    checks++;
    if (of_out != anyof || int'(of_out) != exp_of) begin failures++; $display("FAIL of_out %0d", of_out); end
    for (int a = 0; a < TOT; a++) begin
      checks++;
      if (longint'(cre[a]) != er[a] || longint'(cim[a]) != ei[a]) begin
        failures++;
        if (failures < 10) $display("FAIL C[%0d] got (%0d,%0d) exp (%0d,%0d)", a, cre[a], cim[a], er[a], ei[a]);
      end
    end
  endtask

  initial begin
    start = 0; s_k = 0; c_s_in = 0; of_in = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    pass(6, 3, 0, 0, 1);   // K dominates, random values may exceed 1
    pass(2, 5, 0, 0, 1);
    pass(4, 3, 1, 0, 1);   // overflow compensation: C halved
    pass(3, 5, 1, 0, 0);   // overflowed C dominates: T = c_s + 1
    pass(3, 3, 0, 1, 1);   // saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
