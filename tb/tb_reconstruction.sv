// tb_reconstruction: runs one angle through the reconstruction block at a
// reduced size (NT_FFT = 64, NX_FFT = 16, NX = 8) and compares the result
// with a model of the same steps in real arithmetic: direct DFTs along t and
// x, linear interpolation at M times A, inverse DFT along k_x, and rotation
// of row k_z by exp(j*pi*k_z*R[x]). Every K[k_z][x] * 2^s_k must lie within
// 1.5 % of the largest reference magnitude. M includes positions past the
// last bin (which must read as zero) and R covers the full phase range, so
// the wrap-around of the phase accumulator is exercised. Channel amplitudes
// differ by factors of 4 and 16, so the per-channel scaling factors differ
// and the equalisation steps matter.
module tb_reconstruction;
  import stolt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NT = 64, NXF = 16, NX = 8, NTH = NT/2, NMC = NXF/2 + 1;
  localparam real PI = 3.14159265358979323846;

  logic start, busy, done; scale_t s_k; logic [3:0] stage_o;
  logic p_en, ma_en, r_en;
  logic [$clog2(NT*NX)-1:0] p_addr_a, p_addr_b;
  logic signed [15:0] p_q_a, p_q_b, a_q, r_q, k_re, k_im;
  logic [$clog2(NTH*NMC)-1:0] ma_addr;
  logic [23:0] m_q;
  logic [$clog2(NX)-1:0] r_addr;
  logic [$clog2(NTH)-1:0] k_row;
  logic [$clog2(NXF)-1:0] k_col;

  reconstruction #(.NT_FFT(NT), .NX_FFT(NXF), .NX(NX), .NITER(14)) dut (.*);

  // external memories
  logic signed [15:0] pmem [NT*NX];
  logic [23:0]        mmem [NTH*NMC];
  logic signed [15:0] amem [NTH*NMC];
  logic signed [15:0] rmem [NX];
  always_ff @(posedge clk) begin
    if (p_en) begin p_q_a <= pmem[p_addr_a]; p_q_b <= pmem[p_addr_b]; end
    if (ma_en) begin m_q <= mmem[ma_addr]; a_q <= amem[ma_addr]; end
    if (r_en) r_q <= rmem[r_addr];
  end

  real fr [NTH][NXF], fi [NTH][NXF];
  real gr [NTH][NXF], gi [NTH][NXF];
  real kr [NTH][NXF], ki [NTH][NXF];
  real lr [NTH][NX],  li [NTH][NX];

  initial begin
    int cyc; real peak, tol;
    int seen [16];
    start = 0; k_row = '0; k_col = '0;
    foreach (seen[i]) seen[i] = 0;
    for (int x = 0; x < NX; x++)
      for (int t = 0; t < NT; t++)
        pmem[x*NT + t] = (t < 48) ? 16'((int'($urandom_range(0, 16000)) - 8000) >>> (2 * (x % 3))) : 16'sd0;
    for (int g = 0; g < NMC; g++)
      for (int j = 0; j < NTH; j++) begin
        mmem[g*NTH + j] = 24'($urandom_range(0, (NTH + 2) * 4096 - 1));
        amem[g*NTH + j] = 16'(int'($urandom_range(0, 32768)) - 16384);
      end
    for (int x = 0; x < NX; x++) rmem[x] = 16'(int'($urandom_range(0, 16383)) - 8192);

    // ---- reference model ----
    for (int k = 0; k < NTH; k++)
      for (int x = 0; x < NXF; x++) begin
        fr[k][x] = 0; fi[k][x] = 0;
        if (x < NX)
          for (int t = 0; t < NT; t++) begin
            real v; v = pmem[x*NT + t] / 16384.0;
            fr[k][x] += v * $cos(2*PI*k*t/NT);
            fi[k][x] -= v * $sin(2*PI*k*t/NT);
          end
      end
    for (int k = 0; k < NTH; k++)
      for (int m = 0; m < NXF; m++) begin
        gr[k][m] = 0; gi[k][m] = 0;
        for (int x = 0; x < NXF; x++) begin
          gr[k][m] += fr[k][x]*$cos(2*PI*m*x/NXF) + fi[k][x]*$sin(2*PI*m*x/NXF);
          gi[k][m] += fi[k][x]*$cos(2*PI*m*x/NXF) - fr[k][x]*$sin(2*PI*m*x/NXF);
        end
      end
    for (int m = 0; m < NXF; m++) begin
      int g; g = (m <= NXF/2) ? m : NXF - m;
      for (int j = 0; j < NTH; j++) begin
        int i0; real fq, a, v0r, v0i, v1r, v1i;
        i0 = int'(mmem[g*NTH + j] >> 12);
        fq = (mmem[g*NTH + j] & 24'hfff) / 4096.0;
        a  = amem[g*NTH + j] / 16384.0;
        v0r = (i0 < NTH) ? gr[i0][m] : 0.0;     v0i = (i0 < NTH) ? gi[i0][m] : 0.0;
        v1r = (i0+1 < NTH) ? gr[i0+1][m] : 0.0; v1i = (i0+1 < NTH) ? gi[i0+1][m] : 0.0;
        kr[j][m] = a * (v0r + (v1r - v0r) * fq);
        ki[j][m] = a * (v0i + (v1i - v0i) * fq);
      end
    end
    peak = 0;
    for (int j = 0; j < NTH; j++)
      for (int x = 0; x < NX; x++) begin
        real sr, si, ph, mg;
        sr = 0; si = 0;
        for (int m = 0; m < NXF; m++) begin
          sr += kr[j][m]*$cos(2*PI*m*x/NXF) - ki[j][m]*$sin(2*PI*m*x/NXF);
          si += ki[j][m]*$cos(2*PI*m*x/NXF) + kr[j][m]*$sin(2*PI*m*x/NXF);
        end
        ph = j * (rmem[x] / 4096.0);
        lr[j][x] = sr*$cos(PI*ph) - si*$sin(PI*ph);
        li[j][x] = sr*$sin(PI*ph) + si*$cos(PI*ph);
        mg = $sqrt(lr[j][x]**2 + li[j][x]**2);
        if (mg > peak) peak = mg;
      end

    // ---- run ----
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin
      seen[stage_o]++;
      @(negedge clk); cyc++;
    end
    $display("reconstruction: %0d cycles, s_k = %0d, peak %f", cyc, s_k, peak);
    // every step of the flow must have run
    for (int s = 1; s <= 14; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL step %0d never ran", s); end
    end
    tol = 0.015 * peak;
    for (int j = 0; j < NTH; j++)
      for (int x = 0; x < NX; x++) begin
        real hr, hi;
        @(negedge clk); k_row = 5'(j); k_col = 4'(x);
        @(negedge clk);
        hr = k_re / 16384.0 * (2.0 ** s_k);
        hi = k_im / 16384.0 * (2.0 ** s_k);
        checks++;
        if ((hr-lr[j][x]) > tol || (lr[j][x]-hr) > tol || (hi-li[j][x]) > tol || (li[j][x]-hi) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL K[%0d][%0d] got (%f,%f) exp (%f,%f)", j, x, hr, hi, lr[j][x], li[j][x]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
