// fcr: fault collection registers of the BIRA (redundancy analysis) block.
//
// Holds three things:
//  * up to NENT fault entries: addresses of faulty cells that are not yet
//    covered by a spare;
//  * the repair lists: the row blocks given a spare row block (row, column
//    bank) and the column blocks given a spare column block (column, row bank);
//  * counters of the good spares still free of each kind. They start at
//    NSRB / NSCB, are loaded with NSRB - err_count_r and NSCB - err_count_c
//    when `load_cnt` pulses at the end of the spare test, and count down with
//    every allocation.
// The working address is the fault captured from `f_address` on `capture`, or,
// with `use_entry` high, the lowest valid fault entry. Against it the FCR
// reports combinationally whether it is already covered or already stored
// (`repaired`), whether a stored fault shares its row block
// (`faulty_row_block`) or its column block (`faulty_col_block`), whether a
// kind of spare is used up (`GSRB_fail`, `GSCB_fail`) and whether the entries
// already need every free spare (`full`). The controller's strobes act on the
// next rising edge: `GSRB_repair` / `GSCB_repair` add the working address's
// row / column block to the repair list and drop every entry inside it,
// `store` saves the working address as a new entry, and each `shift_to_CAM`
// cycle presents one repair-list slot on `shift_info` (row slots first) for
// the ARCAM; `shift_done` marks the last slot.
//
// The port names follow the published FCR block diagram; the register layout,
// the covering rules and the counter behaviour are this design's reading of
// the essential-spare-pivoting idea. `rst` is synchronous, active high, and
// clears every register in one cycle, as the published flow requires.
module fcr
  import bisr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  cell_addr_t  f_address,
  input  logic        capture,
  input  logic        load_cnt,
  input  cnt_t        err_count_r,
  input  cnt_t        err_count_c,
  input  logic        use_entry,
  input  logic        GSRB_repair,
  input  logic        GSCB_repair,
  input  logic        store,
  input  logic        shift_to_CAM,
  output logic        repaired,
  output logic        faulty_row_block,
  output logic        faulty_col_block,
  output logic        GSRB_fail,
  output logic        GSCB_fail,
  output logic        full,
  output logic        ent_any,
  output cnt_t        avail_r,
  output cnt_t        avail_c,
  output logic        shift_done,
  output shift_info_t shift_info
);

  localparam int PTW = $clog2(NSP);

  cell_addr_t             cur;
  logic [NENT-1:0]        ent_v;
  cell_addr_t [NENT-1:0]  ent;
  logic [NSRB-1:0]        rr_v;
  row_t [NSRB-1:0]        rr_row;
  logic [NSRB-1:0][CBW-1:0] rr_cb;
  logic [NSCB-1:0]        cr_v;
  col_t [NSCB-1:0]        cr_col;
  logic [NSCB-1:0][RBW-1:0] cr_rb;
  logic [PTW-1:0]         ptr;

  cell_addr_t      wa;            // working address
  logic [NENT-1:0] same_rb, same_cb, same_cell;
  logic [CNTW:0]   n_ent;
  logic            free_found;
  int unsigned     free_idx;
  logic [SIW-1:0]  nr_idx, nc_idx;
  logic [SIW-1:0]  sr_idx, sc_idx; // repair-list slot under the shift pointer

  always_comb begin
    wa = cur;
    if (use_entry)
      for (int i = NENT - 1; i >= 0; i--)
        if (ent_v[i]) wa = ent[i];
    ent_any = |ent_v;

    repaired = 1'b0;
    for (int k = 0; k < NSRB; k++)
      if (rr_v[k] && rr_row[k] == wa.row && rr_cb[k] == col_bank(wa.col)) repaired = 1'b1;
    for (int k = 0; k < NSCB; k++)
      if (cr_v[k] && cr_col[k] == wa.col && cr_rb[k] == row_bank(wa.row)) repaired = 1'b1;

    n_ent = '0;
    for (int i = 0; i < NENT; i++) begin
      same_cell[i] = ent_v[i] && (ent[i] == wa);
      same_rb[i]   = ent_v[i] && !same_cell[i] && (ent[i].row == wa.row)
                     && (col_bank(ent[i].col) == col_bank(wa.col));
      same_cb[i]   = ent_v[i] && !same_cell[i] && (ent[i].col == wa.col)
                     && (row_bank(ent[i].row) == row_bank(wa.row));
      n_ent        = n_ent + ent_v[i];
    end
    if (!use_entry && |same_cell) repaired = 1'b1;
    faulty_row_block = |same_rb;
    faulty_col_block = |same_cb;

    GSRB_fail = (avail_r == '0);
    GSCB_fail = (avail_c == '0);
    full      = (n_ent >= (CNTW+1)'(avail_r) + (CNTW+1)'(avail_c));

    free_found = 1'b0;
    free_idx   = 0;
    for (int i = NENT - 1; i >= 0; i--)
      if (!ent_v[i]) begin
        free_found = 1'b1;
        free_idx   = i;
      end

    // next free slots of the repair lists (lists fill from slot 0 upwards)
    nr_idx = '0;
    for (int k = NSRB - 1; k >= 0; k--) if (!rr_v[k]) nr_idx = SIW'(k);
    nc_idx = '0;
    for (int k = NSCB - 1; k >= 0; k--) if (!cr_v[k]) nc_idx = SIW'(k);

    shift_done = (ptr == PTW'(NSP - 1));
    sr_idx     = SIW'(ptr);
    sc_idx     = SIW'(ptr - PTW'(NSRB));
    if (ptr < PTW'(NSRB)) begin
      shift_info = '{valid:  shift_to_CAM && rr_v[sr_idx],
                     is_col: 1'b0,
                     line:   LNW'(rr_row[sr_idx]),
                     bank:   BKW'(rr_cb[sr_idx])};
    end else begin
      shift_info = '{valid:  shift_to_CAM && cr_v[sc_idx],
                     is_col: 1'b1,
                     line:   LNW'(cr_col[sc_idx]),
                     bank:   BKW'(cr_rb[sc_idx])};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur     <= '0;
      ent_v   <= '0;
      ent     <= '0;
      rr_v    <= '0;
      rr_row  <= '0;
      rr_cb   <= '0;
      cr_v    <= '0;
      cr_col  <= '0;
      cr_rb   <= '0;
      ptr     <= '0;
      avail_r <= cnt_t'(NSRB);
      avail_c <= cnt_t'(NSCB);
    end else begin
      if (capture) cur <= f_address;
      if (load_cnt) begin
        avail_r <= cnt_t'(NSRB) - err_count_r;
        avail_c <= cnt_t'(NSCB) - err_count_c;
      end
      if (GSRB_repair && !GSRB_fail) begin
        rr_v[nr_idx]   <= 1'b1;
        rr_row[nr_idx] <= wa.row;
        rr_cb[nr_idx]  <= col_bank(wa.col);
        avail_r        <= avail_r - 1'b1;
        for (int i = 0; i < NENT; i++)
          if (same_rb[i] || same_cell[i]) ent_v[i] <= 1'b0;
      end else if (GSCB_repair && !GSCB_fail) begin
        cr_v[nc_idx]   <= 1'b1;
        cr_col[nc_idx] <= wa.col;
        cr_rb[nc_idx]  <= row_bank(wa.row);
        avail_c        <= avail_c - 1'b1;
        for (int i = 0; i < NENT; i++)
          if (same_cb[i] || same_cell[i]) ent_v[i] <= 1'b0;
      end else if (store && free_found) begin
        ent_v[free_idx] <= 1'b1;
        ent[free_idx]   <= wa;
      end
      if (shift_to_CAM && !shift_done) ptr <= ptr + 1'b1;
    end
  end

endmodule
