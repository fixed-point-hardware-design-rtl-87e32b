// tb_stolt_workload: the compounding workload at full size. Eleven emission
// angles (the sequence 0, +-3, +-6.5, +-9.5, +-13, +-16 degrees) are
// processed by eleven calls of stolt_hardware with its default parameters;
// C, its factor and the overflow flag are carried from call to call and
// last_flag is set on the eleventh, which also runs the Hilbert stage.
// Frames have NT_REC = 3328 recorded samples of 128 channels, the size of
// recording cases A and B (cases C and D, 1536 samples, differ only in
// NT_REC and fit the same way).
//
// The angle tables are synthetic: per angle, P holds eight random echoes,
// and M, A and R are random within their formats (the physical tables
// depend on probe geometry that is not part of the hardware). The
// testbench models the whole chain in real arithmetic for three channels
// (closed-form temporal spectrum of the echoes, DFT along x, interpolation
// at M times A, inverse DFT along k_x, rotation, sum over angles, analytic
// expansion and inverse DFT along k_z) and requires Re/Im(H) * 2^h_s to lie
// within 2 % of the channel peak. Abs(H) is checked against the stored
// Re/Im for every channel. The cycles of each call are printed.
module tb_stolt_workload;
  import stolt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NT = 4096, NXF = 256, NX = 128, NZ = 2048, NTH = NT/2, NMC = NXF/2 + 1;
  localparam int NT_REC = 3328, NIMP = 8, NCHK = 3, NA = 11;
  localparam real PI = 3.14159265358979323846;

  logic start, last_flag, of_in, busy, done, of_out;
  scale_t c_s_in, c_s_out, h_s_out;
  logic [3:0] rec_step; logic [3:0] active;
  logic p_en, ma_en, r_en, c_ren, c_we, h_ren;
  logic [$clog2(NT*NX)-1:0] p_addr_a, p_addr_b, h_waddr, h_raddr;
  logic signed [15:0] p_q_a, p_q_b, a_q, r_q;
  logic [$clog2(NTH*NMC)-1:0] ma_addr;
  logic [23:0] m_q, h_wd_abs;
  logic [$clog2(NX)-1:0] r_addr;
  logic [$clog2(NTH*NX)-1:0] c_raddr, c_waddr;
  logic signed [23:0] c_rq_re, c_rq_im, c_wd_re, c_wd_im, h_wd_re, h_wd_im, h_rq_re, h_rq_im;
  logic [2:0] h_we;

  stolt_hardware dut (.*);

  logic signed [15:0] pmem [NT*NX];
  logic [23:0]        mmem [NTH*NMC];
  logic signed [15:0] amem [NTH*NMC];
  logic signed [15:0] rmem [NX];
  logic signed [23:0] cre [NTH*NX], cim [NTH*NX];
  logic signed [23:0] hre [NT*NX], him [NT*NX];
  logic [23:0]        habs [NT*NX];
  always_ff @(posedge clk) begin
    if (p_en) begin p_q_a <= pmem[p_addr_a]; p_q_b <= pmem[p_addr_b]; end
    if (ma_en) begin m_q <= mmem[ma_addr]; a_q <= amem[ma_addr]; end
    if (r_en) r_q <= rmem[r_addr];
    if (c_ren) begin c_rq_re <= cre[c_raddr]; c_rq_im <= cim[c_raddr]; end
    if (c_we) begin cre[c_waddr] <= c_wd_re; cim[c_waddr] <= c_wd_im; end
    if (h_ren) begin h_rq_re <= hre[h_raddr]; h_rq_im <= him[h_raddr]; end
    if (h_we[0]) hre[h_waddr] <= h_wd_re;
    if (h_we[1]) him[h_waddr] <= h_wd_im;
    if (h_we[2]) habs[h_waddr] <= h_wd_abs;
  end

  int seen_step [16];
  always @(posedge clk) if (rst_n) seen_step[rec_step]++;

  // reference storage
  int  imp_x [NIMP], imp_t [NIMP];
  real imp_v [NIMP];
  real ct [NT], st [NT], cx [NXF], sx [NXF];
  real gr [NTH][NXF], gi [NTH][NXF];
  real kr [NTH][NXF], ki [NTH][NXF];
  real zr [NTH], zi [NTH];
  real acr [NCHK][NTH], aci [NCHK][NTH];
  real hr [NZ], hi [NZ];
  int  chk_x [NCHK] = '{0, 37, NX - 1};

  initial begin
    longint cyc, total;
    total = 0;
    foreach (seen_step[i]) seen_step[i] = 0;
    start = 0; last_flag = 0; c_s_in = 0; of_in = 0;
    for (int i = 0; i < NT; i++)  begin ct[i] = $cos(2*PI*i/NT);  st[i] = $sin(2*PI*i/NT);  end
    for (int i = 0; i < NXF; i++) begin cx[i] = $cos(2*PI*i/NXF); sx[i] = $sin(2*PI*i/NXF); end

    for (int i = 0; i < NTH*NX; i++) begin cre[i] = 0; cim[i] = 0; end
    for (int i = 0; i < NT*NX; i++) begin hre[i] = 0; him[i] = 0; habs[i] = 0; end
    for (int c = 0; c < NCHK; c++) for (int j = 0; j < NTH; j++) begin acr[c][j] = 0; aci[c][j] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int ang = 0; ang < NA; ang++) begin
    // stimulus of angle ang
    for (int i = 0; i < NT*NX; i++) pmem[i] = '0;
    for (int n = 0; n < NIMP; n++) begin
      int v;
      imp_x[n] = (n < NCHK) ? chk_x[n] : int'($urandom_range(0, NX - 1));
      imp_t[n] = int'($urandom_range(0, NT_REC - 1));
      v = int'($urandom_range(4000, 16000)) * (($urandom_range(0, 1) == 1) ? 1 : -1);
      if (pmem[imp_x[n]*NT + imp_t[n]] != 0) v = 0;        // keep positions distinct
      pmem[imp_x[n]*NT + imp_t[n]] = 16'(v);
      imp_v[n] = v / 16384.0;
    end
    for (int i = 0; i < NTH*NMC; i++) begin
      mmem[i] = 24'($urandom_range(0, (NTH + 2) * 4096 - 1));
      amem[i] = 16'(int'($urandom_range(0, 32768)) - 16384);
    end
    for (int x = 0; x < NX; x++) rmem[x] = 16'(int'($urandom_range(0, 16383)) - 8192);

    // reference part 1: G[k][m] from the impulses directly
    for (int k = 0; k < NTH; k++)
      for (int m = 0; m < NXF; m++) begin
        gr[k][m] = 0; gi[k][m] = 0;
        for (int n = 0; n < NIMP; n++) begin
          int ph; ph = (k * imp_t[n]) % NT;
          // F = v e^{-j2pi k t/NT}; G = F e^{-j2pi m x/NXF}
          begin
            real fr, fi; int q;
            fr = imp_v[n] * ct[ph]; fi = -imp_v[n] * st[ph];
            q = (m * imp_x[n]) % NXF;
            gr[k][m] += fr*cx[q] + fi*sx[q];
            gi[k][m] += fi*cx[q] - fr*sx[q];
          end
        end
      end
    // remap and multiply
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

    @(negedge clk); start = 1; last_flag = (ang == NA - 1);
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    total += cyc;
    $display("angle %0d: %0d cycles, c_s_out=%0d of_out=%0d h_s=%0d", ang, cyc, c_s_out, of_out, h_s_out);
    c_s_in = c_s_out; of_in = of_out;
    for (int c = 0; c < NCHK; c++) begin
      int x;
      x = chk_x[c];
      for (int j = 0; j < NTH; j++) begin
        real sr, si, ph;
        sr = 0; si = 0;
        for (int m = 0; m < NXF; m++) begin
          int q; q = (m * x) % NXF;
          sr += kr[j][m]*cx[q] - ki[j][m]*sx[q];
          si += ki[j][m]*cx[q] + kr[j][m]*sx[q];
        end
        ph = j * (rmem[x] / 4096.0);
        acr[c][j] += sr*$cos(PI*ph) - si*$sin(PI*ph);
        aci[c][j] += sr*$sin(PI*ph) + si*$cos(PI*ph);
      end
    end
    end
    // Hilbert part of the reference, per checked channel
    for (int c = 0; c < NCHK; c++) begin
      int x; real peak, tol; int nf;
      x = chk_x[c];
      for (int j = 0; j < NTH; j++) begin zr[j] = acr[c][j]; zi[j] = aci[c][j]; end
      peak = 0;
      for (int z = 0; z < NZ; z++) begin
        hr[z] = 0; hi[z] = 0;
        for (int l = 0; l <= NTH; l++) begin
          real vr, vi; int q;
          if (l == 0)        begin vr = zr[0] / 2;     vi = zi[0] / 2; end
          else if (l == NTH) begin vr = zr[NTH-1] / 2; vi = zi[NTH-1] / 2; end
          else               begin vr = zr[l];         vi = zi[l]; end
          q = (l * z) % NT;
          hr[z] += vr*ct[q] - vi*st[q];
          hi[z] += vr*st[q] + vi*ct[q];
        end
        if ($sqrt(hr[z]**2 + hi[z]**2) > peak) peak = $sqrt(hr[z]**2 + hi[z]**2);
      end
      tol = 0.02 * peak; nf = 0;
      for (int z = 0; z < NZ; z++) begin
        real vr, vi;
        vr = hre[x*NT + z] / 4194304.0 * (2.0 ** h_s_out);
        vi = him[x*NT + z] / 4194304.0 * (2.0 ** h_s_out);
        checks++;
        if ((vr-hr[z]) > tol || (hr[z]-vr) > tol || (vi-hi[z]) > tol || (hi[z]-vi) > tol) begin
          failures++; nf++;
          if (nf < 5) $display("FAIL channel %0d H[%0d] got (%f,%f) exp (%f,%f)", x, z, vr, vi, hr[z], hi[z]);
        end
      end
      $display("channel %0d: peak %f, %0d mismatches", x, peak, nf);
    end

    // Abs(H) against the stored Re/Im for every channel
    begin
      int nbad, nnz; nbad = 0; nnz = 0;
      for (int x = 0; x < NX; x++)
        for (int z = 0; z < NZ; z++) begin
          longint sq, r;
          sq = longint'(hre[x*NT+z])*hre[x*NT+z] + longint'(him[x*NT+z])*him[x*NT+z];
          r = 0;
          for (int b = 24; b >= 0; b--) if ((r | (64'd1 << b)) * (r | (64'd1 << b)) <= sq) r = r | (64'd1 << b);
          if (longint'(habs[x*NT+z]) != r) nbad++;
          if (habs[x*NT+z] != 0) nnz++;
        end
      checks++; if (nbad != 0) begin failures++; $display("FAIL %0d Abs(H) mismatches", nbad); end
      checks++; if (nnz < NX*NZ/2) begin failures++; $display("FAIL envelope mostly zero (%0d nonzero)", nnz); end
    end
    for (int s = 1; s <= 14; s++) begin
      checks++;
      if (seen_step[s] == 0) begin failures++; $display("FAIL reconstruction step %0d never ran", s); end
    end
    $display("11 angles: %0d cycles in total (%.1f ms at 80 MHz)", total, total / 80.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
