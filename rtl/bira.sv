// bira: built-in redundancy analysis, the FCR controller and the fault
// collection registers wired together as in the published FCR structure.
//
// Faults from the BIST arrive as `erm_m` + `f_address`; each is answered by a
// `cnt` pulse two cycles later (judge, then acknowledge), during which
// `hold` is high. `load_cnt` with the ARCAM's faulty-spare counts
// (`err_count_r/_c`) sets the number of usable spares at the end of the spare
// test. After `finish` the open faults are assigned, the repair records are
// shifted out on `shift_info` (NSP cycles) and `finish_r` rises; `repair_fail`
// tells that the faults could not all be covered. See fcr_ctrl and fcr for the
// allocation rule. Reset `rst` is synchronous and active high.
module bira
  import bisr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        erm_m,
  input  cell_addr_t  f_address,
  input  logic        finish,
  input  logic        load_cnt,
  input  cnt_t        err_count_r,
  input  cnt_t        err_count_c,
  output logic        hold,
  output logic        cnt,
  output logic        repair_fail,
  output logic        finish_r,
  output shift_info_t shift_info
);

  logic repaired, faulty_row_block, faulty_col_block, GSRB_fail, GSCB_fail;
  logic full, ent_any, shift_done;
  cnt_t avail_r, avail_c;
  logic capture, use_entry, GSRB_repair, GSCB_repair, store, shift_to_CAM;

  fcr_ctrl u_ctrl (
    .clk, .rst, .erm_m, .finish, .hold, .cnt, .repair_fail, .finish_r,
    .repaired, .faulty_row_block, .faulty_col_block, .GSRB_fail, .GSCB_fail,
    .full, .ent_any, .avail_r, .avail_c, .shift_done,
    .capture, .use_entry, .GSRB_repair, .GSCB_repair, .store, .shift_to_CAM
  );

  fcr u_fcr (
    .clk, .rst, .f_address, .capture, .load_cnt, .err_count_r, .err_count_c,
    .use_entry, .GSRB_repair, .GSCB_repair, .store, .shift_to_CAM,
    .repaired, .faulty_row_block, .faulty_col_block, .GSRB_fail, .GSCB_fail,
    .full, .ent_any, .avail_r, .avail_c, .shift_done, .shift_info
  );

endmodule
