// bisr_top: built-in self-repair (BISR) memory with global block-level
// redundancy.
//
// A 16 x 16 memory is split into 8-cell row blocks and column blocks (two row
// banks, two column banks). Three global spare row blocks and three global
// spare column blocks can each replace a faulty block anywhere in the array,
// which suits defects that come in clusters. Pulsing `BISR_start` runs the
// repair flow:
//   1. the BIST tests the spare blocks; faulty spares are flagged in the ARCAM;
//   2. the BIST tests the main array; each faulty cell is handed to the BIRA,
//      which decides on the spot, or stores the fault, and lets the BIST go on;
//   3. at the end of the test the BIRA assigns the open faults and shifts its
//      repair records into the ARCAM;
//   4. mission mode: every access to the mission port is remapped by the ARCAM
//      and the AR steering, bit by bit, to the spares that replace faulty
//      blocks.
// `BISR_done` rises at the end of step 3 and stays high; `repairable` is then
// high when every fault found is covered. The mission port (`addr`, `we`,
// `wdata`, `rdata`, `match`) writes on the rising edge and reads
// combinationally. Before the flow and while it runs, mission accesses reach
// the raw array (no remapping; during the tests mission writes are ignored).
// The flow, the block split and the spare counts follow the published
// scheme; the march test, the handshake timing and the allocation details are
// this design's own (see the submodules). The stuck-at inputs plant defects in
// the main array (*_sa_* index r*COLS+c) and in the spares, for testing; tie
// them to zero in normal use. `rst` is synchronous and active high.
module bisr_top
  import bisr_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     BISR_start,
  output logic                     BISR_done,
  output logic                     repairable,
  output logic                     bira_hold,
  // mission port
  input  row_t                     addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata,
  output logic                     match,
  // defect injection
  input  logic [ROWS*COLS-1:0]     mm_sa_en,
  input  logic [ROWS*COLS-1:0]     mm_sa_val,
  input  logic [NSRB-1:0][BLK-1:0] srb_sa_en,
  input  logic [NSRB-1:0][BLK-1:0] srb_sa_val,
  input  logic [NSCB-1:0][BLK-1:0] scb_sa_en,
  input  logic [NSCB-1:0][BLK-1:0] scb_sa_val
);

  // BIST
  logic            bist_busy, bist_finish, t_spare, t_we;
  row_t            t_addr;
  word_t           t_wdata, t_rdata;
  logic            erm_s, spare_done, erm_m, cnt;
  logic [NSP-1:0]  spare_fail;
  cell_addr_t      f_address;
  // BIRA / ARCAM
  logic            repair_fail, finish_r;
  shift_info_t     shift_info;
  cnt_t            err_count_r, err_count_c;
  remap_t [NCB-1:0]  row_map;
  remap_t [COLS-1:0] col_map;
  // memories
  mode_e           mode;
  row_t            mm_addr;
  logic            mm_we;
  word_t           mm_wdata, mm_rdata;
  logic [NSRB-1:0][BLK-1:0] srb_bwe, srb_wdata, srb_q;
  off_t            scb_off;
  logic [NSCB-1:0] scb_we, scb_wbit, scb_q;

  assign mode       = !bist_busy ? MODE_MISSION : (t_spare ? MODE_SPARE_TEST : MODE_MAIN_TEST);
  assign BISR_done  = finish_r;
  assign repairable = finish_r && !repair_fail;

  bist u_bist (
    .clk, .rst, .start(BISR_start), .busy(bist_busy), .finish(bist_finish),
    .t_spare, .t_addr, .t_we, .t_wdata, .t_rdata,
    .erm_s, .spare_fail, .spare_done, .erm_m, .f_address, .cnt
  );

  bira u_bira (
    .clk, .rst, .erm_m, .f_address, .finish(bist_finish),
    .load_cnt(spare_done), .err_count_r, .err_count_c,
    .hold(bira_hold), .cnt, .repair_fail, .finish_r, .shift_info
  );

  arcam u_arcam (
    .clk, .rst, .erm_s, .spare_fail, .err_count_r, .err_count_c,
    .shift_info, .addr, .row_map, .col_map, .match
  );

  ar u_ar (
    .mode, .t_addr, .t_we, .t_wdata, .t_rdata,
    .m_addr(addr), .m_we(we), .m_wdata(wdata), .m_rdata(rdata),
    .row_map, .col_map,
    .mm_addr, .mm_we, .mm_wdata, .mm_rdata,
    .srb_bwe, .srb_wdata, .srb_q, .scb_off, .scb_we, .scb_wbit, .scb_q
  );

  main_mem u_main (
    .clk, .addr(mm_addr), .we(mm_we), .wdata(mm_wdata), .rdata(mm_rdata),
    .sa_en(mm_sa_en), .sa_val(mm_sa_val)
  );

  spare_mem u_spare (
    .clk, .srb_bwe, .srb_wdata, .srb_q, .scb_off, .scb_we, .scb_wbit, .scb_q,
    .srb_sa_en, .srb_sa_val, .scb_sa_en, .scb_sa_val
  );

endmodule
