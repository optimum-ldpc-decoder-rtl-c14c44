// ldpc_control: sequencer of the layered (TDMP) decoder.
//
// For every iteration and every block row the controller
//   1. fetches the stored H entries of the block row from the H storage,
//      one per cycle, until the end marker (block column 31).  Each shift is
//      adapted to the current Z (as stored, floor(s*Z/96), or s mod Z); the
//      dual-diagonal parity entries (block columns kb+r and kb+r+1, shift 0,
//      kb = 24 - mb) are generated here, not stored;
//   2. runs the Z rows of the block row in Z/P groups of P rows, one row per
//      processing unit.  A group takes c reads (one edge per cycle, all units
//      in step), one turn-around cycle, and c writebacks, where c is the row
//      degree.  Edge j of unit p touches posterior sample
//      x = (g*P + p + shift_j) mod Z of block column col_j; the P samples of
//      a group lie at offset x%P in word x/P and the next word (mod Z/P).
//      The first group of a block row reads both words; later groups read
//      only the next word, because the lower one is the upper word of the
//      previous group, which the shuffler kept.  Writebacks always write
//      both parts with masks.  Two words needed in one cycle from the same
//      bank take two cycles (a stall);
//   3. reads the compressed extrinsic record of the group at the first read
//      cycle and writes the new record at the first writeback cycle.
// Extrinsic messages count as zero in the first iteration (lam_zero).
// After `iters` iterations done pulses for one cycle and busy drops.
//
// Interface timing: memories answer one cycle after a read; the pi_* and
// pu_in_* outputs are registered so that they line up with the returning
// read data.  Configuration inputs are sampled when start is seen while idle.
// Z must be a multiple of P (checked by an assertion); that restriction and
// the marker word are this design's choices.
module ldpc_control
  import ldpc_pkg::*;
#(
  parameter int P      = 3,
  parameter int NBANK  = 2,
  parameter int ROM_AW = 11,
  parameter int GAW    = $clog2(NB * (ZMAX / P) / NBANK),
  parameter int LAW    = $clog2(MBMAX * ZMAX / P),
  localparam int BW    = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int OW    = (P > 1) ? $clog2(P) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration and status
  input  logic                       start,
  input  logic [6:0]                 cfg_z,
  input  logic [3:0]                 cfg_mb,
  input  logic [ROM_AW-1:0]          cfg_hbase,
  input  shift_mode_e                cfg_smode,
  input  logic [3:0]                 cfg_iters,
  output logic                       busy,
  output logic                       done,
  output logic                       stall,     // bank-conflict cycle
  // H storage
  output logic                       rom_re,
  output logic [ROM_AW-1:0]          rom_addr,
  input  h_entry_t                   rom_data,
  // posterior memory read side
  output logic [NBANK-1:0]           g_re,
  output logic [NBANK-1:0][GAW-1:0]  g_raddr,
  // forward shuffler, aligned with read data
  output logic                       pi_valid,
  output logic [BW-1:0]              pi_lo_bank,
  output logic [BW-1:0]              pi_hi_bank,
  output logic                       pi_use_reg,
  output logic                       pi_use_left,
  output logic                       pi_load_reg,
  output logic [OW-1:0]              pi_off,
  output logic [IDXW-1:0]            pu_in_idx,
  // processing units
  output logic                       pu_clr,
  output logic                       lam_zero,
  output logic [IDXW-1:0]            wb_idx,
  // inverse shuffler and posterior memory write side
  output logic [OW-1:0]              inv_off,
  output logic [BW-1:0]              inv_lo_bank,
  output logic [BW-1:0]              inv_hi_bank,
  output logic                       inv_wr_lo,
  output logic                       inv_wr_hi,
  output logic [NBANK-1:0][GAW-1:0]  g_waddr,
  // extrinsic memories (shared address for all units)
  output logic                       lam_re,
  output logic [LAW-1:0]             lam_raddr,
  output logic                       lam_we,
  output logic [LAW-1:0]             lam_waddr
);

  localparam int WPC = ZMAX / P;        // words per block column
  localparam int WPB = WPC / NBANK;     // words per block column per bank

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_READ, S_WAIT, S_WRITE} state_e;
  state_e state_q;

  // configuration
  logic [6:0]        z_q;
  logic [5:0]        gw_q;              // groups per block row = Z/P
  logic [3:0]        mb_q, iters_q;
  logic [ROM_AW-1:0] hbase_q;
  shift_mode_e       smode_q;

  // position
  logic [3:0]        iter_q, brow_q;
  logic [4:0]        grp_q;
  logic [IDXW-1:0]   j_q;
  logic              phase_q;

  // entry list of the current block row
  logic [COLW-1:0]   ent_col [CMAX];
  logic [SHW-1:0]    ent_sh  [CMAX];
  logic [IDXW-1:0]   deg_q;

  // H fetch
  logic [ROM_AW-1:0] ptr_q, faddr_q, rowstart_q;
  logic              fvalid_q;

  // ---------------------------------------------------------------- shifts
  logic [SHW-1:0] eff_shift;
  logic [13:0]    sprod;
  always_comb begin
    sprod = 14'(rom_data.shift) * 14'(z_q);
    unique case (smode_q)
      SHIFT_SCALE: eff_shift = SHW'(sprod / 14'(ZMAX));
      SHIFT_MOD:   eff_shift = SHW'(rom_data.shift % z_q);
      default:     eff_shift = rom_data.shift;
    endcase
  end

  // ------------------------------------------------- address of edge j_q
  logic [7:0]     tmp, x;
  logic [5:0]     w0, w1;
  logic [OW-1:0]  off;
  logic           need_hi, conflict, use_left, rd_conflict;
  logic [BW-1:0]  lo_bank, hi_bank;
  logic [GAW-1:0] lo_addr, hi_addr, col_base;

  always_comb begin
    tmp      = 8'(grp_q) * 8'(P) + 8'(ent_sh[j_q]);
    x        = (tmp >= 8'(z_q)) ? tmp - 8'(z_q) : tmp;
    w0       = 6'(x / 8'(P));
    off      = OW'(x % 8'(P));
    w1       = (w0 + 6'd1 == gw_q) ? 6'd0 : w0 + 6'd1;
    need_hi  = (off != '0);
    lo_bank  = BW'(w0 % 6'(NBANK));
    hi_bank  = BW'(w1 % 6'(NBANK));
    conflict = need_hi && (lo_bank == hi_bank);
    // after the first group the lower word of an edge is the upper word
    // the previous group fetched, kept in the shuffler: fetch only the new one
    use_left    = need_hi && (grp_q != '0);
    rd_conflict = conflict && !use_left;
    col_base = GAW'(ent_col[j_q]) * GAW'(WPB);
    lo_addr  = col_base + GAW'(w0 / 6'(NBANK));
    hi_addr  = col_base + GAW'(w1 / 6'(NBANK));
  end

  logic last_edge;
  logic [LAW-1:0] row_addr;
  always_comb begin
    last_edge = (j_q == deg_q - 1'b1);
    row_addr  = LAW'(brow_q) * LAW'(gw_q) + LAW'(grp_q);
  end

  // ------------------------------------------------- combinational outputs
  always_comb begin
    rom_re      = (state_q == S_FETCH);
    rom_addr    = ptr_q;
    g_re        = '0;
    g_raddr     = '0;
    g_waddr     = '0;
    pu_clr      = 1'b0;
    lam_re      = 1'b0;
    lam_raddr   = row_addr;
    lam_we      = 1'b0;
    lam_waddr   = row_addr;
    wb_idx      = j_q;
    inv_off     = off;
    inv_lo_bank = lo_bank;
    inv_hi_bank = hi_bank;
    inv_wr_lo   = 1'b0;
    inv_wr_hi   = 1'b0;
    stall       = 1'b0;
    unique case (state_q)
      S_READ: begin
        if (j_q == '0 && !phase_q) begin
          pu_clr = 1'b1;
          lam_re = 1'b1;
        end
        if (use_left) begin
          g_re[hi_bank]    = 1'b1;
          g_raddr[hi_bank] = hi_addr;
        end else if (!rd_conflict) begin
          g_re[lo_bank]    = 1'b1;
          g_raddr[lo_bank] = lo_addr;
          if (need_hi) begin
            g_re[hi_bank]    = 1'b1;
            g_raddr[hi_bank] = hi_addr;
          end
        end else if (!phase_q) begin
          g_re[lo_bank]    = 1'b1;
          g_raddr[lo_bank] = lo_addr;
          stall            = 1'b1;
        end else begin
          g_re[hi_bank]    = 1'b1;
          g_raddr[hi_bank] = hi_addr;
        end
      end
      S_WRITE: begin
        if (j_q == '0 && !phase_q) lam_we = 1'b1;
        if (!conflict) begin
          inv_wr_lo        = 1'b1;
          g_waddr[lo_bank] = lo_addr;
          if (need_hi) begin
            inv_wr_hi        = 1'b1;
            g_waddr[hi_bank] = hi_addr;
          end
        end else if (!phase_q) begin
          inv_wr_lo        = 1'b1;
          g_waddr[lo_bank] = lo_addr;
          stall            = 1'b1;
        end else begin
          inv_wr_hi        = 1'b1;
          g_waddr[hi_bank] = hi_addr;
        end
      end
      default: ;
    endcase
  end

  assign busy     = (state_q != S_IDLE);
  assign lam_zero = (iter_q == '0);

  // ------------------------------------------------------------ sequencer
  logic [4:0] kb;
  assign kb = 5'(NB) - 5'(mb_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      z_q         <= 7'(ZMAX);
      gw_q        <= 6'(WPC);
      mb_q        <= '0;
      iters_q     <= '0;
      hbase_q     <= '0;
      smode_q     <= SHIFT_DIRECT;
      iter_q      <= '0;
      brow_q      <= '0;
      grp_q       <= '0;
      j_q         <= '0;
      phase_q     <= 1'b0;
      deg_q       <= '0;
      ptr_q       <= '0;
      faddr_q     <= '0;
      rowstart_q  <= '0;
      fvalid_q    <= 1'b0;
      done        <= 1'b0;
      pi_valid    <= 1'b0;
      pi_lo_bank  <= '0;
      pi_hi_bank  <= '0;
      pi_use_reg  <= 1'b0;
      pi_use_left <= 1'b0;
      pi_load_reg <= 1'b0;
      pi_off      <= '0;
      pu_in_idx   <= '0;
      for (int e = 0; e < CMAX; e++) begin
        ent_col[e] <= '0;
        ent_sh[e]  <= '0;
      end
    end else begin
      done        <= 1'b0;
      // read tag, one cycle behind the read request
      pi_valid    <= 1'b0;
      pi_load_reg <= 1'b0;
      pi_use_reg  <= 1'b0;
      pi_use_left <= 1'b0;
      pi_lo_bank  <= lo_bank;
      pi_hi_bank  <= hi_bank;
      pi_off      <= off;
      pu_in_idx   <= j_q;

      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            z_q        <= cfg_z;
            gw_q       <= 6'(cfg_z / 7'(P));
            mb_q       <= cfg_mb;
            iters_q    <= cfg_iters;
            hbase_q    <= cfg_hbase;
            smode_q    <= cfg_smode;
            iter_q     <= '0;
            brow_q     <= '0;
            grp_q      <= '0;
            ptr_q      <= cfg_hbase;
            rowstart_q <= cfg_hbase;
            deg_q      <= '0;
            fvalid_q   <= 1'b0;
            state_q    <= S_FETCH;
          end
        end

        S_FETCH: begin
          ptr_q    <= ptr_q + 1'b1;
          fvalid_q <= 1'b1;
          faddr_q  <= ptr_q;
          if (fvalid_q) begin
            if (rom_data.col == COL_END) begin
              // append the generated dual-diagonal entries
              if (brow_q != '0 && brow_q != mb_q - 1'b1) begin
                ent_col[deg_q]        <= kb + 5'(brow_q);
                ent_sh[deg_q]         <= '0;
                ent_col[deg_q + 1'b1] <= kb + 5'(brow_q) + 5'd1;
                ent_sh[deg_q + 1'b1]  <= '0;
                deg_q                 <= deg_q + IDXW'(2);
              end else begin
                ent_col[deg_q] <= (brow_q == '0) ? kb + 5'd1 : kb + 5'(brow_q);
                ent_sh[deg_q]  <= '0;
                deg_q          <= deg_q + 1'b1;
              end
              rowstart_q <= faddr_q + 1'b1;
              fvalid_q   <= 1'b0;
              j_q        <= '0;
              phase_q    <= 1'b0;
              grp_q      <= '0;
              state_q    <= S_READ;
            end else begin
              ent_col[deg_q] <= rom_data.col;
              ent_sh[deg_q]  <= eff_shift;
              deg_q          <= deg_q + 1'b1;
            end
          end
        end

        S_READ: begin
          if (rd_conflict && !phase_q) begin
            phase_q     <= 1'b1;
            pi_load_reg <= 1'b1;
          end else begin
            phase_q     <= 1'b0;
            pi_valid    <= 1'b1;
            pi_use_reg  <= rd_conflict;
            pi_use_left <= use_left;
            if (last_edge) state_q <= S_WAIT;
            else           j_q     <= j_q + 1'b1;
          end
        end

        S_WAIT: begin
          j_q     <= '0;
          phase_q <= 1'b0;
          state_q <= S_WRITE;
        end

        S_WRITE: begin
          if (conflict && !phase_q) begin
            phase_q <= 1'b1;
          end else begin
            phase_q <= 1'b0;
            j_q     <= '0;
            if (!last_edge) begin
              j_q <= j_q + 1'b1;
            end else if (6'(grp_q) != gw_q - 1'b1) begin
              grp_q   <= grp_q + 1'b1;
              state_q <= S_READ;
            end else begin
              grp_q    <= '0;
              deg_q    <= '0;
              fvalid_q <= 1'b0;
              if (brow_q != mb_q - 1'b1) begin
                brow_q  <= brow_q + 1'b1;
                ptr_q   <= rowstart_q;
                state_q <= S_FETCH;
              end else if (iter_q != iters_q - 1'b1) begin
                brow_q  <= '0;
                iter_q  <= iter_q + 1'b1;
                ptr_q   <= hbase_q;
                state_q <= S_FETCH;
              end else begin
                brow_q  <= '0;
                done    <= 1'b1;
                state_q <= S_IDLE;
              end
            end
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ checks
  a_z_multiple: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state_q == S_IDLE) |-> (cfg_z % 7'(P) == '0) && cfg_z <= 7'(ZMAX));
  a_deg: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_READ) |-> (deg_q != '0 && deg_q <= IDXW'(CMAX)));

endmodule
