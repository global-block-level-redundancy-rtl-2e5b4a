// fcr_ctrl: FCR controller, the decision maker of the redundancy analysis.
//
// It runs the allocation rule called Essential Most Spare Pivoting here:
//  * During the main-array test every reported fault (`erm_m`) is captured
//    into the FCR and judged one cycle later (hold high). A fault that is
//    already covered or already stored is ignored. A fault that shares a row
//    block with a stored fault makes that row block essential: it gets a
//    global spare row block at once. Likewise a shared column block gets a
//    global spare column block. If the needed kind is used up, or the fault
//    shares nothing, it is stored as a new entry, unless the stored entries
//    already need every free spare, which is a repair failure. One cycle
//    later `cnt` pulses so that the BIST resumes.
//  * When the BIST raises `finish`, the entries still open each get a spare
//    of the kind that has most free spares left (row blocks on a tie); an
//    entry for which no spare is left is a repair failure.
//  * Then, if the repair succeeded, the repair lists are shifted to the ARCAM
//    (`shift_to_CAM`, one slot per cycle), and `finish_r` rises and stays high
//    until `rst`. `repair_fail` is sticky.
// The port names follow the published FCR block diagram. The published text
// names the algorithm but does not spell it out; the rule above is this
// design's interpretation (essential pivots first, the leftovers by which
// spare kind is most plentiful). `rst` is synchronous and active high.
module fcr_ctrl
  import bisr_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic erm_m,
  input  logic finish,
  output logic hold,
  output logic cnt,
  output logic repair_fail,
  output logic finish_r,
  // FCR status
  input  logic repaired,
  input  logic faulty_row_block,
  input  logic faulty_col_block,
  input  logic GSRB_fail,
  input  logic GSCB_fail,
  input  logic full,
  input  logic ent_any,
  input  cnt_t avail_r,
  input  cnt_t avail_c,
  input  logic shift_done,
  // FCR commands
  output logic capture,
  output logic use_entry,
  output logic GSRB_repair,
  output logic GSCB_repair,
  output logic store,
  output logic shift_to_CAM
);

  typedef enum logic [2:0] {C_IDLE, C_CHECK, C_ACK, C_FINAL, C_SHIFT, C_DONE} cstate_e;

  cstate_e state;
  logic    fail_q;
  logic    fail_now;

  always_comb begin
    capture      = 1'b0;
    use_entry    = 1'b0;
    GSRB_repair  = 1'b0;
    GSCB_repair  = 1'b0;
    store        = 1'b0;
    shift_to_CAM = 1'b0;
    fail_now     = 1'b0;
    case (state)
      C_IDLE:  capture = erm_m;
      C_CHECK: begin
        if (!fail_q && !repaired) begin
          if (faulty_row_block && !GSRB_fail)      GSRB_repair = 1'b1;
          else if (faulty_col_block && !GSCB_fail) GSCB_repair = 1'b1;
          else if (full)                           fail_now    = 1'b1;
          else                                     store       = 1'b1;
        end
      end
      C_FINAL: begin
        use_entry = 1'b1;
        if (!fail_q && ent_any) begin
          if (avail_r >= avail_c && !GSRB_fail) GSRB_repair = 1'b1;
          else if (!GSCB_fail)                  GSCB_repair = 1'b1;
          else                                  fail_now    = 1'b1;
        end
      end
      C_SHIFT: shift_to_CAM = 1'b1;
      default: ;
    endcase
  end

  assign hold        = (state == C_CHECK) || (state == C_ACK) || (state == C_FINAL)
                       || (state == C_SHIFT);
  assign cnt         = (state == C_ACK);
  assign repair_fail = fail_q;
  assign finish_r    = (state == C_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      fail_q <= 1'b0;
    end else begin
      if (fail_now) fail_q <= 1'b1;
      case (state)
        C_IDLE: begin
          if (erm_m)       state <= C_CHECK;
          else if (finish) state <= C_FINAL;
        end
        C_CHECK: state <= C_ACK;
        C_ACK:   state <= C_IDLE;
        C_FINAL: begin
          if (fail_q || fail_now) state <= C_DONE;
          else if (!ent_any)      state <= C_SHIFT;
        end
        C_SHIFT: if (shift_done) state <= C_DONE;
        default: ;
      endcase
    end
  end

  // Faults are only reported while the controller is idle, and the BIST
  // finishes only when no fault is being judged.
  a_erm_idle: assert property (@(posedge clk) disable iff (rst) erm_m |-> state == C_IDLE);
  a_one_cmd:  assert property (@(posedge clk) disable iff (rst)
                               $onehot0({GSRB_repair, GSCB_repair, store, fail_now}));

endmodule
