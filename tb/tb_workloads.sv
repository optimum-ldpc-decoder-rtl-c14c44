// tb_workloads: the decoder, at its default parameters, runs the five use
// cases that size its memories, each for 8 iterations: 802.11n N=1944 and
// 802.16e N=2304 at rate 1/2, 802.11n N=648 and 802.16e N=576 at rate 5/6,
// and 802.11n N=648 at rate 3/4.
//
// How: the standards' shift tables are not reproduced (this testbench's own
// choice).  Each base matrix is generated with the code's expansion factor,
// block-row count and row degrees, so the graph has the standard's edge count
// (checked: 6966, 7296, 2376 and 1920 for the first four), with random shifts
// and the dual-diagonal parity part the decoder generates.  The matrix is
// loaded through the H storage port, the channel values through the host
// port, and a decode is started; every posterior read back afterwards is
// compared bit for bit with a behavioural layered normalized Min-Sum model
// (factor 3/4, magnitudes capped at 31), and the cycle count from start to
// done with the schedule formula.  The two rate-1/2 frames, with 3 % of the
// channel values of the wrong sign, must decode to the all-zero codeword.
// The time at 648 MHz is printed next to the decoding deadline (8 us for
// 802.11n, 0.25 ms for 802.16e); the 802.16e cases must meet theirs, the
// 802.11n ones are only reported, since three serial units at this clock do
// not reach them.  A watchdog ends the run if the decoder hangs.
module tb_workloads;
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

  // bank-conflict stall cycles
  int n_stall = 0;
  always @(posedge clk) if (rst_n && stall) n_stall++;

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

  // build a base matrix whose first n_hi block rows have degree deg_lo + 1 and
  // the others deg_lo; h_b column kb in rows 0, MB/2 and MB-1, dual diagonal
  // generated as the decoder does
  task automatic make_matrix(input int deg_lo, input int n_hi, input int shmax);
    int d;
    bit hb;
    KB = 24 - MB;
    for (int r = 0; r < MB; r++) begin
      hb = (r == 0 || r == MB / 2 || r == MB - 1);
      d = deg_lo + (r < n_hi ? 1 : 0) - ((r == 0 || r == MB - 1) ? 1 : 2) - (hb ? 1 : 0);
      nst[r] = 0;
      for (int i = 0; i < d; i++) begin
        rcol[r][nst[r]] = (r * d + i) % KB;
        rsh[r][nst[r]]  = $urandom_range(shmax, 0);
        nst[r]++;
      end
      if (hb) begin
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
                          input int iters, input int deg_lo, input int n_hi, input int shmax,
                          input int flip_pct, input int edges, input real deadline_us,
                          input bit expect_clean);
    int base, cyc, mism, errs, ne;
    real us;
    Z = z; MB = mb; MODE = mode; ITERS = iters;
    n_stall = 0;
    make_matrix(deg_lo, n_hi, shmax);
    ne = 0;
    for (int r = 0; r < MB; r++) ne += deg[r] * Z;
    if (edges > 0) check(ne == edges, $sformatf("%s: %0d graph edges, expected %0d", name, ne, edges));
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
    us = real'(cyc) / 648.0;
    $display("%s: %0d edges, %0d cycles (%0d stalls) for %0d iterations = %.1f us at 648 MHz, deadline %.1f us",
             name, ne, cyc, n_stall, iters, us, deadline_us);
    if (deadline_us > 100.0) check(us <= deadline_us, $sformatf("%s misses its deadline", name));
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
    run_case("11n_N1944_R1/2", 81, 12, SHIFT_DIRECT, 8, 7, 2, 80, 3, 6966, 8.0, 1'b1);
    run_case("16e_N2304_R1/2", 96, 12, SHIFT_SCALE,  8, 6, 4, 95, 3, 7296, 250.0, 1'b1);
    run_case("11n_N648_R5/6",  27, 4,  SHIFT_DIRECT, 8, 22, 0, 26, 1, 2376, 8.0, 1'b0);
    run_case("16e_N576_R5/6",  24, 4,  SHIFT_SCALE,  8, 20, 0, 95, 1, 1920, 250.0, 1'b0);
    run_case("11n_N648_R3/4",  27, 6,  SHIFT_DIRECT, 8, 14, 3, 26, 2, 0, 8.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
