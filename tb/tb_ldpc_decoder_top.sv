// tb_ldpc_decoder_top: end-to-end test of the decoder at its default sizes.
//
// Four use cases are decoded one after another, each from its own place in
// the H storage: Z=81 with 12 block rows (the 1944-bit 802.11n shape, odd
// Z/P so bank conflicts occur), Z=96 with 12 block rows (2304 bits, full
// posterior memory), Z=48 with 6 block rows and scaled shifts, and Z=24 with
// 4 block rows, rows of degree 20-22 and modulo shifts.  Base matrices are
// generated here with the dual-diagonal parity structure; LLRs are those of
// the all-zero codeword with noise.  A behavioural layered normalized Min-Sum model (factor 3/4,
// magnitudes capped at 31),
// written over full codeword and message arrays, is run alongside; every
// posterior value read back must match it bit for bit, the hard decisions of
// the lightly corrupted case must be all zero, and the cycle count must equal
// fetch + sum over groups of (2c + 1 + conflicts).  Stalls, the three shift
// rules, saturation, the shuffler register path and the use of several
// extrinsic partitions are counted and must each occur.
module tb_ldpc_decoder_top;
  import ldpc_pkg::*;

  localparam int P = 3;
  localparam int NBANK = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                rom_we;
  logic [8:0]          rom_waddr;
  logic [47:0]         rom_wdata;
  logic                start;
  logic [6:0]          cfg_z;
  logic [3:0]          cfg_mb;
  logic [10:0]         cfg_hbase;
  shift_mode_e         cfg_smode;
  logic [3:0]          cfg_iters;
  logic                busy, done, stall;
  logic [P-1:0][3:0]   lam_part_en;
  logic                host_we, host_re;
  logic [4:0]          host_col, host_word;
  msg_t [P-1:0]        host_wdata, host_rdata;
  logic [P-1:0]        host_hd;

  ldpc_decoder_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- mechanism counters
  int n_left = 0;
  always @(posedge clk) if (rst_n && dut.pi_use_left && dut.pi_valid) n_left++;
  int n_stall = 0, n_use_reg = 0, n_sat = 0, n_part_hi = 0, n_first_iter = 0, n_later_iter = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.pi_use_reg && dut.pi_valid) n_use_reg++;
    if (dut.pu_valid && (dut.g_pu[0].u_pu.rho == 127 || dut.g_pu[0].u_pu.rho == -127)) n_sat++;
    if (|lam_part_en[0][3:1]) n_part_hi++;
    if (dut.pu_clr && dut.lam_zero) n_first_iter++;
    if (dut.pu_clr && !dut.lam_zero) n_later_iter++;
  end
  int n_mode [3] = '{0, 0, 0};

  // ------------------------------------------------------------ H storage image
  logic [11:0] rom_img [1296];
  int rom_fill = 0;

  // matrix of the current use case
  int Z, MB, KB, ITERS;
  shift_mode_e MODE;
  int nst  [12];          // stored entries per block row
  int rcol [12][22];      // raw stored columns
  int rsh  [12][22];      // raw stored shifts
  int deg  [12];
  int ecol [12][22];      // all edges: column
  int esh  [12][22];      // all edges: effective shift

  int gam [2304];
  int lam [1152][22];
  int llr [2304];

  function automatic int satv(int v);
    return v > 127 ? 127 : (v < -127 ? -127 : v);
  endfunction

  function automatic int eff(int s);
    case (MODE)
      SHIFT_SCALE: return (s * Z) / 96;
      SHIFT_MOD:   return s % Z;
      default:     return s;
    endcase
  endfunction

  // build a base matrix: dinfo info columns per row, h_b column kb in rows
  // 0, MB/2 and MB-1, dual diagonal generated as the decoder does
  task automatic make_matrix(input int dmin, input int dmax, input int shmax);
    int d;
    KB = 24 - MB;
    for (int r = 0; r < MB; r++) begin
      d = dmin + (r % (dmax - dmin + 1));
      nst[r] = 0;
      for (int i = 0; i < d; i++) begin
        rcol[r][nst[r]] = (r * d + i) % KB;
        rsh[r][nst[r]]  = $urandom_range(shmax, 0);
        if (r == 0 && i == 0) rsh[r][nst[r]] = shmax;  // wraps in the first group
        nst[r]++;
      end
      if (r == 0 || r == MB / 2 || r == MB - 1) begin
        rcol[r][nst[r]] = KB;
        rsh[r][nst[r]]  = (r == MB / 2) ? 0 : $urandom_range(shmax, 0);
        nst[r]++;
      end
      deg[r] = 0;
      for (int i = 0; i < nst[r]; i++) begin
        ecol[r][deg[r]] = rcol[r][i];
        esh[r][deg[r]]  = eff(rsh[r][i]);
        deg[r]++;
      end
      if (r > 0) begin ecol[r][deg[r]] = KB + r; esh[r][deg[r]] = 0; deg[r]++; end
      if (r < MB - 1) begin ecol[r][deg[r]] = KB + r + 1; esh[r][deg[r]] = 0; deg[r]++; end
    end
  endtask

  task automatic write_rom_image(output int base);
    base = rom_fill;
    for (int r = 0; r < MB; r++) begin
      for (int i = 0; i < nst[r]; i++) rom_img[rom_fill++] = {7'(rsh[r][i]), 5'(rcol[r][i])};
      rom_img[rom_fill++] = {7'd0, 5'd31};
    end
    while (rom_fill % 4 != 0) rom_img[rom_fill++] = 12'h0;
    for (int wi = base / 4; wi < rom_fill / 4; wi++) begin
      @(negedge clk);
      rom_we    = 1'b1;
      rom_waddr = 9'(wi);
      rom_wdata = {rom_img[wi*4+3], rom_img[wi*4+2], rom_img[wi*4+1], rom_img[wi*4]};
    end
    @(negedge clk);
    rom_we = 1'b0;
  endtask

  // behavioural layered Min-Sum over full arrays
  task automatic reference();
    int rho [22];
    int pos [22];
    for (int i = 0; i < 24 * Z; i++) gam[i] = llr[i];
    for (int i = 0; i < MB * Z; i++) for (int j = 0; j < 22; j++) lam[i][j] = 0;
    for (int it = 0; it < ITERS; it++)
      for (int r = 0; r < MB; r++)
        for (int t = 0; t < Z; t++) begin
          int row = r * Z + t;
          for (int j = 0; j < deg[r]; j++) begin
            pos[j] = ecol[r][j] * Z + (t + esh[r][j]) % Z;
            rho[j] = satv(gam[pos[j]] - lam[row][j]);
          end
          for (int j = 0; j < deg[r]; j++) begin
            int mn = 1000, sg = 0, L;
            for (int k = 0; k < deg[r]; k++) if (k != j) begin
              int a = rho[k] < 0 ? -rho[k] : rho[k];
              if (a < mn) mn = a;
              if (rho[k] < 0) sg ^= 1;
            end
            mn = (mn * 3) / 4;
            if (mn > 31) mn = 31;
            L = sg ? -mn : mn;
            lam[row][j] = L;
            gam[pos[j]] = satv(rho[j] + L);
          end
        end
  endtask

  function automatic int expected_cycles();
    int cyc = 0;
    int gw = Z / P;
    for (int it = 0; it < ITERS; it++)
      for (int r = 0; r < MB; r++) begin
        cyc += nst[r] + 2;
        for (int g = 0; g < gw; g++) begin
          int conf = 0;
          for (int j = 0; j < deg[r]; j++) begin
            int x = (g * P + esh[r][j]) % Z;
            int w0 = x / P, w1 = (x / P + 1) % gw;
            // writes always need both words; reads only in the first group
            if (x % P != 0 && (w0 % NBANK) == (w1 % NBANK)) conf += (g == 0) ? 2 : 1;
          end
          cyc += 2 * deg[r] + 1 + conf;
        end
      end
    return cyc;
  endfunction

  task automatic run_case(input string name, input int z, input int mb, input shift_mode_e mode,
                          input int iters, input int dmin, input int dmax, input int shmax,
                          input int flip_pct, input bit expect_clean);
    int base, cyc, mism, errs;
    Z = z; MB = mb; MODE = mode; ITERS = iters;
    n_mode[int'(mode)]++;
    make_matrix(dmin, dmax, shmax);
    write_rom_image(base);
    // channel LLRs of the all-zero codeword
    for (int i = 0; i < 24 * Z; i++) begin
      int m = $urandom_range(40, 1);
      if ($urandom_range(99, 0) < flip_pct) m = -int'($urandom_range(20, 1));
      if ($urandom_range(199, 0) == 0) m = 127;   // a few saturated inputs
      llr[i] = m;
    end
    for (int c = 0; c < 24; c++)
      for (int w = 0; w < Z / P; w++) begin
        @(negedge clk);
        host_we   = 1'b1;
        host_col  = 5'(c);
        host_word = 5'(w);
        for (int p = 0; p < P; p++) host_wdata[p] = msg_t'(llr[c * Z + w * P + p]);
      end
    @(negedge clk);
    host_we = 1'b0;
    reference();
    // decode
    cfg_z = 7'(Z); cfg_mb = 4'(MB); cfg_hbase = 11'(base); cfg_smode = mode; cfg_iters = 4'(iters);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == expected_cycles() + 1, $sformatf("%s: cycles %0d, expected %0d", name, cyc, expected_cycles() + 1));
    $display("%s: %0d cycles for %0d iterations", name, cyc, iters);
    @(negedge clk);
    // read back
    mism = 0; errs = 0;
    for (int c = 0; c < 24; c++)
      for (int w = 0; w < Z / P; w++) begin
        host_re = 1'b1; host_col = 5'(c); host_word = 5'(w);
        @(negedge clk);
        host_re = 1'b0;
        for (int p = 0; p < P; p++) begin
          int i = c * Z + w * P + p;
          if (int'(host_rdata[p]) != gam[i]) begin
            mism++;
            if (mism < 5) $display("  %s: gamma[%0d] = %0d, model %0d", name, i, host_rdata[p], gam[i]);
          end
          checks++;
          if (host_hd[p]) errs++;
        end
      end
    if (mism != 0) failures++;
    check(!expect_clean || errs == 0, $sformatf("%s: %0d hard-decision errors after decoding", name, errs));
    $display("%s: %0d posterior mismatches, %0d bit errors", name, mism, errs);
  endtask

  initial begin
    rom_we = 0; rom_waddr = '0; rom_wdata = '0; start = 0; cfg_z = '0; cfg_mb = '0;
    cfg_hbase = '0; cfg_smode = SHIFT_DIRECT; cfg_iters = '0; host_we = 0; host_re = 0;
    host_col = '0; host_word = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_case("Z81_mb12_direct", 81, 12, SHIFT_DIRECT, 8, 5, 6, 80, 2, 1'b1);
    run_case("Z96_mb12_scale",  96, 12, SHIFT_SCALE,  2, 4, 5, 95, 8, 1'b0);
    run_case("Z48_mb6_scale",   48, 6,  SHIFT_SCALE,  3, 12, 14, 95, 8, 1'b0);
    run_case("Z24_mb4_mod",     24, 4,  SHIFT_MOD,    2, 17, 19, 127, 8, 1'b0);
    $display("leftover reuse=%0d", n_left);
    $display("mechanisms: stalls=%0d shuffler-register=%0d saturations=%0d upper-partitions=%0d first-iter-rows=%0d later-rows=%0d modes=%0d/%0d/%0d",
             n_stall, n_use_reg, n_sat, n_part_hi, n_first_iter, n_later_iter, n_mode[0], n_mode[1], n_mode[2]);
    check(n_stall > 0, "no bank-conflict stall");
    check(n_use_reg > 0, "shuffler register path unused");
    check(n_left > 0, "leftover words never reused");
    check(n_sat > 0, "no saturation");
    check(n_part_hi > 0, "upper extrinsic partitions unused");
    check(n_first_iter > 0 && n_later_iter > 0, "iteration modes");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "shift rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
