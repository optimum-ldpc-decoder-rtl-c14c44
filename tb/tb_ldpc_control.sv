// tb_ldpc_control: the controller runs small matrices held in an h_rom.
// Every posterior read and write it issues (bank, address, and which half of
// the shuffled word is written) is compared, cycle by cycle, with a list
// built here from the matrix: edge j of group g touches sample
// x = (g*P + shift_j) mod Z of block column col_j, words x/P and x/P+1
// (mod Z/P), banks word%2, two cycles when both words share a bank; after
// the first group of a block row only the upper word is read.  Also
// checked: the generated dual-diagonal edges, the extrinsic addresses, the
// first-iteration flag, stall cycles and the total cycle count.
module tb_ldpc_control;
  import ldpc_pkg::*;

  localparam int P = 3, NBANK = 2, GAW = 9, LAW = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, stall;
  logic [6:0] cfg_z;
  logic [3:0] cfg_mb, cfg_iters;
  logic [10:0] cfg_hbase;
  shift_mode_e cfg_smode;
  logic rom_re; logic [10:0] rom_addr; h_entry_t rom_data;
  logic rom_we; logic [8:0] rom_waddr; logic [47:0] rom_wdata;
  logic [NBANK-1:0] g_re; logic [NBANK-1:0][GAW-1:0] g_raddr, g_waddr;
  logic pi_valid, pi_use_reg, pi_use_left, pi_load_reg; logic [0:0] pi_lo_bank, pi_hi_bank, inv_lo_bank, inv_hi_bank;
  logic [1:0] pi_off, inv_off; logic [IDXW-1:0] pu_in_idx, wb_idx;
  logic pu_clr, lam_zero, inv_wr_lo, inv_wr_hi, lam_re, lam_we;
  logic [LAW-1:0] lam_raddr, lam_waddr;

  h_rom u_rom (.clk, .load_we(rom_we), .load_addr(rom_waddr), .load_data(rom_wdata),
               .re(rom_re), .raddr(rom_addr), .rdata(rom_data));
  ldpc_control dut (.clk, .rst_n, .start, .cfg_z, .cfg_mb, .cfg_hbase, .cfg_smode, .cfg_iters,
    .busy, .done, .stall, .rom_re, .rom_addr, .rom_data, .g_re, .g_raddr,
    .pi_valid, .pi_lo_bank, .pi_hi_bank, .pi_use_reg, .pi_use_left, .pi_load_reg, .pi_off, .pu_in_idx,
    .pu_clr, .lam_zero, .wb_idx, .inv_off, .inv_lo_bank, .inv_hi_bank, .inv_wr_lo, .inv_wr_hi,
    .g_waddr, .lam_re, .lam_raddr, .lam_we, .lam_waddr);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  // expected access events: kind 0 = read, 1 = write; mask of banks; addrs
  typedef struct { int kind; int bmask; int a0; int a1; int lam; } ev_t;
  ev_t exp_q[$];
  int n_stall_exp, n_cycles_exp;

  int Z, MB, KB;
  int nst [12], rc [12][8], rs [12][8], deg [12], ec [12][10], es [12][10];

  task automatic add_access(input int kind, input int r, input int g, input int j, input int row);
    int x, w0, w1, o, b0, b1, base;
    ev_t e;
    x = (g * P + es[r][j]) % Z; w0 = x / P; o = x % P; w1 = (w0 + 1) % (Z / P);
    b0 = w0 % 2; b1 = w1 % 2; base = ec[r][j] * 16;
    e.kind = kind; e.a0 = -1; e.a1 = -1; e.lam = (j == 0) ? row : -1;
    if (kind == 0 && o != 0 && g > 0) begin
      // only the new upper word is fetched
      e.bmask = 1 << b1; if (b1 == 0) e.a0 = base + w1 / 2; else e.a1 = base + w1 / 2;
      exp_q.push_back(e);
    end else if (o == 0) begin
      e.bmask = 1 << b0; if (b0 == 0) e.a0 = base + w0 / 2; else e.a1 = base + w0 / 2;
      exp_q.push_back(e);
    end else if (b0 != b1) begin
      e.bmask = 3;
      if (b0 == 0) begin e.a0 = base + w0 / 2; e.a1 = base + w1 / 2; end
      else         begin e.a1 = base + w0 / 2; e.a0 = base + w1 / 2; end
      exp_q.push_back(e);
    end else begin
      e.bmask = 1 << b0; if (b0 == 0) e.a0 = base + w0 / 2; else e.a1 = base + w0 / 2;
      exp_q.push_back(e);
      e.lam = -1; if (b0 == 0) e.a0 = base + w1 / 2; else e.a1 = base + w1 / 2;
      exp_q.push_back(e);
      n_stall_exp += 1;
    end
  endtask

  task automatic run(input int z, input int mb, input shift_mode_e mode, input int iters, input int hbase);
    int fill, cyc, nst_tot;
    logic [11:0] img [64];
    Z = z; MB = mb; KB = 24 - mb;
    exp_q.delete(); n_stall_exp = 0; n_cycles_exp = 0; fill = 0;
    for (int r = 0; r < MB; r++) begin
      nst[r] = 2 + r % 2;
      for (int i = 0; i < nst[r]; i++) begin
        rc[r][i] = (r + 3 * i) % KB; rs[r][i] = $urandom_range(95, 0);
        img[fill++] = {7'(rs[r][i]), 5'(rc[r][i])};
      end
      img[fill++] = {7'd0, 5'd31};
      deg[r] = 0;
      for (int i = 0; i < nst[r]; i++) begin
        ec[r][deg[r]] = rc[r][i];
        es[r][deg[r]] = (mode == SHIFT_SCALE) ? rs[r][i] * Z / 96 : (mode == SHIFT_MOD ? rs[r][i] % Z : rs[r][i]);
        deg[r]++;
      end
      if (r > 0) begin ec[r][deg[r]] = KB + r; es[r][deg[r]] = 0; deg[r]++; end
      if (r < MB - 1) begin ec[r][deg[r]] = KB + r + 1; es[r][deg[r]] = 0; deg[r]++; end
    end
    while (fill % 4) img[fill++] = '0;
    for (int w = 0; w < fill / 4; w++) begin
      @(negedge clk); rom_we = 1; rom_waddr = 9'(hbase / 4 + w);
      rom_wdata = {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]};
    end
    @(negedge clk); rom_we = 0;
    for (int it = 0; it < iters; it++)
      for (int r = 0; r < MB; r++) begin
        n_cycles_exp += nst[r] + 2;
        for (int g = 0; g < Z / P; g++) begin
          int st0 = n_stall_exp;
          for (int j = 0; j < deg[r]; j++) add_access(0, r, g, j, r * (Z / P) + g);
          for (int j = 0; j < deg[r]; j++) add_access(1, r, g, j, r * (Z / P) + g);
          n_cycles_exp += 2 * deg[r] + 1 + 2 * (n_stall_exp - st0) / 2;
        end
      end
    cfg_z = 7'(Z); cfg_mb = 4'(MB); cfg_smode = mode; cfg_iters = 4'(iters); cfg_hbase = 11'(hbase);
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      // compare this cycle's accesses with the expected list
      if (|g_re || inv_wr_lo || inv_wr_hi) begin
        ev_t e; int bm; int a0, a1;
        bit wr = inv_wr_lo || inv_wr_hi;
        bm = 0; a0 = -1; a1 = -1;
        if (!wr) begin
          bm = int'(g_re);
          if (g_re[0]) a0 = int'(g_raddr[0]);
          if (g_re[1]) a1 = int'(g_raddr[1]);
        end else begin
          if (inv_wr_lo) bm |= 1 << inv_lo_bank;
          if (inv_wr_hi) bm |= 1 << inv_hi_bank;
          if (bm[0]) a0 = int'(g_waddr[0]);
          if (bm[1]) a1 = int'(g_waddr[1]);
        end
        if (exp_q.size() == 0) check(0, "unexpected access");
        else begin
          e = exp_q.pop_front();
          check(e.kind == int'(wr) && e.bmask == bm && e.a0 == a0 && e.a1 == a1,
                $sformatf("access kind %0d mask %0d a0 %0d a1 %0d, expected %0d %0d %0d %0d",
                          wr, bm, a0, a1, e.kind, e.bmask, e.a0, e.a1));
          if (e.lam >= 0) begin
            if (!wr) check(lam_re && int'(lam_raddr) == e.lam && pu_clr, "extrinsic read");
            else     check(lam_we && int'(lam_waddr) == e.lam, "extrinsic write");
          end
        end
      end
      if (stall) n_stall_exp--;
      @(negedge clk); cyc++;
    end
    check(exp_q.size() == 0, $sformatf("%0d accesses missing", exp_q.size()));
    check(n_stall_exp == 0, $sformatf("stall count off by %0d", n_stall_exp));
    check(cyc == n_cycles_exp + 1, $sformatf("cycles %0d expected %0d", cyc, n_cycles_exp + 1));
    check(!busy, "busy after done");
  endtask

  // first-iteration flag
  int zero_rows, later_rows;
  always @(posedge clk) if (pu_clr) begin
    if (lam_zero) zero_rows++; else later_rows++;
  end

  initial begin
    start = 0; rom_we = 0; rom_waddr = '0; rom_wdata = '0; cfg_z = '0; cfg_mb = '0;
    cfg_iters = '0; cfg_hbase = '0; cfg_smode = SHIFT_DIRECT;
    zero_rows = 0; later_rows = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(9, 4, SHIFT_MOD, 2, 0);
    check(zero_rows == 4 * 3 && later_rows == 4 * 3, "first-iteration flag");
    run(24, 6, SHIFT_SCALE, 1, 40);
    run(81, 12, SHIFT_MOD, 1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
