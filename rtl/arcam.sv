// arcam: address remapping CAM.
//
// One entry per spare element: NSRB row-spare entries (row, column bank) and
// NSCB column-spare entries (column, row bank), each with a valid bit and a
// faulty flag. During the spare test every `erm_s` pulse sets the faulty flag
// of each spare named in `spare_fail` (bit k: GSRB k, bit NSRB+k: GSCB k);
// `err_count_r/_c` give the number of faulty row / column spares for the FCR.
// After the redundancy analysis the FCR shifts its repair records in on
// `shift_info`; a valid record is written, on the rising edge, into the
// lowest entry of its kind that is neither faulty nor already used, so faulty
// spares are skipped. In mission mode the CAM compares the accessed row `addr`
// with all entries at once (combinational): `row_map[cb]` says whether column
// bank cb of that row is served by a spare row block and by which one,
// `col_map[c]` the same for column c and the spare column blocks, and `match`
// is high when any of them hits.
//
// The faulty flags set by erm_s, the err_count signal, the transfer from the
// FCR and the match output follow the published BISR flow; the entry layout
// and the fill order are this design's own. `rst` is synchronous, active high.
module arcam
  import bisr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   erm_s,
  input  logic [NSP-1:0]         spare_fail,
  output cnt_t                   err_count_r,
  output cnt_t                   err_count_c,
  input  shift_info_t            shift_info,
  input  row_t                   addr,
  output remap_t [NCB-1:0]       row_map,
  output remap_t [COLS-1:0]      col_map,
  output logic                   match
);

  logic [NSRB-1:0]          r_v, r_f;
  row_t [NSRB-1:0]          r_row;
  logic [NSRB-1:0][CBW-1:0] r_cb;
  logic [NSCB-1:0]          c_v, c_f;
  col_t [NSCB-1:0]          c_col;
  logic [NSCB-1:0][RBW-1:0] c_rb;

  logic           r_free_ok, c_free_ok;
  logic [SIW-1:0] r_free, c_free;

  always_comb begin
    err_count_r = '0;
    for (int k = 0; k < NSRB; k++) err_count_r = err_count_r + cnt_t'(r_f[k]);
    err_count_c = '0;
    for (int k = 0; k < NSCB; k++) err_count_c = err_count_c + cnt_t'(c_f[k]);

    r_free_ok = 1'b0;
    r_free    = '0;
    for (int k = NSRB - 1; k >= 0; k--)
      if (!r_v[k] && !r_f[k]) begin
        r_free_ok = 1'b1;
        r_free    = SIW'(k);
      end
    c_free_ok = 1'b0;
    c_free    = '0;
    for (int k = NSCB - 1; k >= 0; k--)
      if (!c_v[k] && !c_f[k]) begin
        c_free_ok = 1'b1;
        c_free    = SIW'(k);
      end

    for (int cb = 0; cb < NCB; cb++) begin
      row_map[cb] = '0;
      for (int k = 0; k < NSRB; k++)
        if (r_v[k] && r_row[k] == addr && r_cb[k] == CBW'(cb))
          row_map[cb] = '{hit: 1'b1, idx: SIW'(k)};
    end
    for (int c = 0; c < COLS; c++) begin
      col_map[c] = '0;
      for (int k = 0; k < NSCB; k++)
        if (c_v[k] && c_col[k] == col_t'(c) && c_rb[k] == row_bank(addr))
          col_map[c] = '{hit: 1'b1, idx: SIW'(k)};
    end
    match = 1'b0;
    for (int cb = 0; cb < NCB; cb++) match |= row_map[cb].hit;
    for (int c = 0; c < COLS; c++)   match |= col_map[c].hit;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r_v <= '0; r_f <= '0; r_row <= '0; r_cb <= '0;
      c_v <= '0; c_f <= '0; c_col <= '0; c_rb <= '0;
    end else begin
      if (erm_s) begin
        r_f <= r_f | spare_fail[NSRB-1:0];
        c_f <= c_f | spare_fail[NSP-1:NSRB];
      end
      if (shift_info.valid && !shift_info.is_col && r_free_ok) begin
        r_v[r_free]   <= 1'b1;
        r_row[r_free] <= row_t'(shift_info.line);
        r_cb[r_free]  <= CBW'(shift_info.bank);
      end
      if (shift_info.valid && shift_info.is_col && c_free_ok) begin
        c_v[c_free]   <= 1'b1;
        c_col[c_free] <= col_t'(shift_info.line);
        c_rb[c_free]  <= RBW'(shift_info.bank);
      end
    end
  end

  // The FCR never hands over more records of a kind than there are good
  // spares of that kind.
  a_row_room: assert property (@(posedge clk) disable iff (rst)
                               shift_info.valid && !shift_info.is_col |-> r_free_ok);
  a_col_room: assert property (@(posedge clk) disable iff (rst)
                               shift_info.valid && shift_info.is_col |-> c_free_ok);

endmodule
