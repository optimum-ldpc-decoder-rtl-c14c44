// ldpc_decoder_top: layered (TDMP) Min-Sum LDPC decoder for the quasi-cyclic
// codes of IEEE 802.11n and 802.16e, organised around its memories.
//
// Blocks: H storage (h_rom) read by the controller (ldpc_control); the
// posterior memory gamma_mem (NBANK banks, words of P samples); the forward
// shuffler pi (shuffle_fwd) feeding P serial processing units (proc_unit),
// each with its own extrinsic memory (lambda_mem); the inverse shuffler
// pi^-1 (shuffle_inv) writing the updated posteriors back.
//
// Use: load the H entries through rom_we/rom_waddr/rom_wdata (four 12-bit
// entries per word, each block row ended by an entry with column 31); write
// the channel LLRs through the host port (host_we, word host_word of block
// column host_col holds samples host_word*P .. host_word*P+P-1); pulse start
// with the configuration (Z, number of block rows, first entry of the
// matrix, shift rule, iterations); wait for done; read the posteriors back
// through the host port (host_re, data one cycle later).  host_hd gives the
// hard decisions (1 where the LLR is negative).  The host port may only be
// used while busy is low.  stall marks the cycles lost to two words of one
// access sitting in the same bank; lam_part_en shows which extrinsic memory
// partitions are enabled (the others may be powered down).
//
// Timing: a group of P rows of degree c takes 2c+1 cycles plus one cycle per
// bank conflict (reads conflict only in the first group of a block row); a block row adds (stored entries + 2) cycles of H fetch.
module ldpc_decoder_top
  import ldpc_pkg::*;
#(
  parameter int P         = 3,      // processing units
  parameter int NBANK     = 2,      // posterior memory banks
  parameter int ROM_WORDS = 324,    // 48-bit words of H storage
  parameter int LPART     = 4,      // extrinsic memory partitions per unit
  parameter int LPDEPTH   = 96,     // entries per partition
  localparam int ROM_AW   = $clog2(ROM_WORDS*4),
  localparam int ROM_WAW  = $clog2(ROM_WORDS),
  localparam int GDEPTH   = NB * (ZMAX / P) / NBANK,
  localparam int GAW      = $clog2(GDEPTH),
  localparam int LAW      = $clog2(LPART*LPDEPTH),
  localparam int BW       = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int OW       = (P > 1) ? $clog2(P) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // H storage load
  input  logic                   rom_we,
  input  logic [ROM_WAW-1:0]     rom_waddr,
  input  logic [4*HEW-1:0]       rom_wdata,
  // decode control
  input  logic                   start,
  input  logic [6:0]             cfg_z,
  input  logic [3:0]             cfg_mb,
  input  logic [ROM_AW-1:0]      cfg_hbase,
  input  shift_mode_e            cfg_smode,
  input  logic [3:0]             cfg_iters,
  output logic                   busy,
  output logic                   done,
  output logic                   stall,        // bank-conflict cycle
  output logic [P-1:0][LPART-1:0] lam_part_en, // extrinsic partitions in use
  // host access to the posterior memory
  input  logic                   host_we,
  input  logic                   host_re,
  input  logic [COLW-1:0]        host_col,
  input  logic [4:0]             host_word,
  input  msg_t [P-1:0]           host_wdata,
  output msg_t [P-1:0]           host_rdata,
  output logic [P-1:0]           host_hd
);

  // controller
  logic                      rom_re;
  logic [ROM_AW-1:0]         rom_raddr;
  h_entry_t                  rom_rdata;
  logic [NBANK-1:0]          c_re;
  logic [NBANK-1:0][GAW-1:0] c_raddr, c_waddr;
  logic                      pi_valid, pi_use_reg, pi_use_left, pi_load_reg;
  logic [BW-1:0]             pi_lo_bank, pi_hi_bank, inv_lo_bank, inv_hi_bank;
  logic [OW-1:0]             pi_off, inv_off;
  logic [IDXW-1:0]           pu_in_idx, wb_idx;
  logic                      pu_clr, lam_zero, inv_wr_lo, inv_wr_hi;
  logic                      lam_re, lam_we;
  logic [LAW-1:0]            lam_raddr, lam_waddr;

  h_rom #(.WORDS(ROM_WORDS)) u_rom (
    .clk, .load_we(rom_we), .load_addr(rom_waddr), .load_data(rom_wdata),
    .re(rom_re), .raddr(rom_raddr), .rdata(rom_rdata)
  );

  ldpc_control #(.P(P), .NBANK(NBANK), .ROM_AW(ROM_AW), .GAW(GAW), .LAW(LAW)) u_ctrl (
    .clk, .rst_n, .start, .cfg_z, .cfg_mb, .cfg_hbase, .cfg_smode, .cfg_iters,
    .busy, .done, .stall,
    .rom_re, .rom_addr(rom_raddr), .rom_data(rom_rdata),
    .g_re(c_re), .g_raddr(c_raddr),
    .pi_valid, .pi_lo_bank, .pi_hi_bank, .pi_use_reg, .pi_use_left, .pi_load_reg, .pi_off, .pu_in_idx,
    .pu_clr, .lam_zero, .wb_idx,
    .inv_off, .inv_lo_bank, .inv_hi_bank, .inv_wr_lo, .inv_wr_hi, .g_waddr(c_waddr),
    .lam_re, .lam_raddr, .lam_we, .lam_waddr
  );

  // posterior memory with host port multiplexed in while idle
  logic [NBANK-1:0]          g_re, g_we, inv_we;
  logic [NBANK-1:0][GAW-1:0] g_raddr, g_waddr;
  logic [NBANK-1:0][P-1:0]   g_wmask, inv_wmask;
  msg_t [NBANK-1:0][P-1:0]   g_wdata, inv_wdata, g_rdata;
  logic [BW-1:0]             host_bank, host_bank_q;
  logic [GAW-1:0]            host_addr;

  always_comb begin
    host_bank = BW'(host_word % 5'(NBANK));
    host_addr = GAW'(host_col) * GAW'(ZMAX / P / NBANK) + GAW'(host_word / 5'(NBANK));
    if (busy) begin
      g_re    = c_re;
      g_raddr = c_raddr;
      g_we    = inv_we;
      g_waddr = c_waddr;
      g_wmask = inv_wmask;
      g_wdata = inv_wdata;
    end else begin
      g_re    = '0;
      g_raddr = '0;
      g_we    = '0;
      g_waddr = '0;
      g_wmask = '0;
      g_wdata = '0;
      g_re[host_bank]    = host_re;
      g_raddr[host_bank] = host_addr;
      g_we[host_bank]    = host_we;
      g_waddr[host_bank] = host_addr;
      g_wmask[host_bank] = '1;
      g_wdata[host_bank] = host_wdata;
    end
  end

  always_ff @(posedge clk)
    if (host_re && !busy) host_bank_q <= host_bank;

  always_comb begin
    host_rdata = g_rdata[host_bank_q];
    for (int p = 0; p < P; p++) host_hd[p] = host_rdata[p][W-1];
  end

  gamma_mem #(.P(P), .NBANK(NBANK), .DEPTH(GDEPTH)) u_gamma (
    .clk, .re(g_re), .raddr(g_raddr), .rdata(g_rdata),
    .we(g_we), .waddr(g_waddr), .wmask(g_wmask), .wdata(g_wdata)
  );

  // pi
  logic         pu_valid;
  msg_t [P-1:0] pu_gamma_in, pu_gamma_out;

  shuffle_fwd #(.P(P), .NBANK(NBANK)) u_pi (
    .clk, .rdata(g_rdata), .in_valid(pi_valid), .lo_bank(pi_lo_bank),
    .hi_bank(pi_hi_bank), .use_reg(pi_use_reg), .use_left(pi_use_left), .idx(pu_in_idx),
    .load_reg(pi_load_reg),
    .off(pi_off), .out_valid(pu_valid), .out(pu_gamma_in)
  );

  // processing units and their extrinsic memories
  for (genvar p = 0; p < P; p++) begin : g_pu
    lam_rec_t rec_rd, rec_wr;

    lambda_mem #(.NPART(LPART), .PDEPTH(LPDEPTH)) u_lam (
      .clk, .re(lam_re), .raddr(lam_raddr), .rdata(rec_rd),
      .we(lam_we), .waddr(lam_waddr), .wdata(rec_wr), .part_en(lam_part_en[p])
    );

    proc_unit u_pu (
      .clk, .rst_n, .clr(pu_clr), .in_valid(pu_valid), .in_idx(pu_in_idx),
      .gamma_in(pu_gamma_in[p]), .lam_rec(rec_rd), .lam_zero,
      .wb_idx, .gamma_out(pu_gamma_out[p]), .rec_out(rec_wr)
    );
  end

  // pi^-1
  shuffle_inv #(.P(P), .NBANK(NBANK)) u_pinv (
    .vals(pu_gamma_out), .off(inv_off), .lo_bank(inv_lo_bank), .hi_bank(inv_hi_bank),
    .wr_lo(inv_wr_lo), .wr_hi(inv_wr_hi), .we(inv_we), .wmask(inv_wmask), .wdata(inv_wdata)
  );

endmodule
