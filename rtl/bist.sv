// bist: built-in self-test controller running March C- over the spare blocks
// and then over the main array.
//
// Order of work follows the published BISR flow: the spare memory is tested
// first and every failing spare cell is reported with a one-cycle `erm_s`
// pulse whose `spare_fail` bitmap names the spare elements concerned, so that
// their faulty flags can be set in the ARCAM. When the spare test ends,
// `spare_done` pulses for one cycle (the ARCAM's faulty-spare counts are then
// loaded into the FCR). The main array is tested next. On each main-array
// mismatch the BIST stops, and for every failing bit of the word it raises
// `erm_m` for one cycle with the cell address on `f_address`, then waits for
// the BIRA's `cnt` pulse before reporting the next bit or resuming the march.
// `finish` goes high, and stays high, once the main test is over.
//
// The march algorithm (March C-: up w0; up r0 w1; up r1 w0; down r0 w1;
// down r1 w0; up r0) and the test view of the spare blocks are this design's
// choices; the published scheme names neither. In the spare test view word j
// (j = 0..BLK-1) holds cell j of every spare: bit k is GSRB k and bit NSRB+k
// is GSCB k. Every march operation takes one clock cycle; reads compare the
// combinational read data in the same cycle. Reset (`rst`) is synchronous and
// active high; `start` is sampled in the idle state.
module bist
  import bisr_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            busy,
  output logic            finish,
  // memory test port
  output logic            t_spare,     // 1: spare test view, 0: main array
  output row_t            t_addr,
  output logic            t_we,
  output word_t           t_wdata,
  input  word_t           t_rdata,
  // spare memory results
  output logic            erm_s,
  output logic [NSP-1:0]  spare_fail,
  output logic            spare_done,
  // main memory results
  output logic            erm_m,
  output cell_addr_t      f_address,
  input  logic            cnt
);

  localparam int NELEM = 6;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_REPORT, S_WAIT, S_DONE} state_e;

  typedef struct packed {
    logic       down;     // address order
    logic [1:0] nops;     // operations per address (1 or 2)
    logic [1:0] is_rd;    // op i is a read
    logic [1:0] val;      // data value (all zeros / all ones) of op i
  } elem_t;

  function automatic elem_t march(input logic [2:0] e);
    case (e)
      3'd0:    return '{down: 1'b0, nops: 2'd1, is_rd: 2'b00, val: 2'b00}; // w0
      3'd1:    return '{down: 1'b0, nops: 2'd2, is_rd: 2'b01, val: 2'b10}; // r0 w1
      3'd2:    return '{down: 1'b0, nops: 2'd2, is_rd: 2'b01, val: 2'b01}; // r1 w0
      3'd3:    return '{down: 1'b1, nops: 2'd2, is_rd: 2'b01, val: 2'b10}; // r0 w1
      3'd4:    return '{down: 1'b1, nops: 2'd2, is_rd: 2'b01, val: 2'b01}; // r1 w0
      default: return '{down: 1'b0, nops: 2'd1, is_rd: 2'b01, val: 2'b00}; // r0
    endcase
  endfunction

  state_e     state;
  logic       phase_main;
  logic [2:0] elem;
  logic       opi;
  row_t       addr;
  word_t      diff;

  elem_t el;
  row_t  last_addr, end_addr;
  word_t mask, expect_w, mism;
  logic  op_rd, op_val;
  logic  last_op;
  col_t  fail_col;

  always_comb begin
    el         = march(elem);
    op_rd      = el.is_rd[opi];
    op_val     = el.val[opi];
    last_addr  = phase_main ? row_t'(ROWS - 1) : row_t'(BLK - 1);
    mask       = phase_main ? '1 : word_t'((1 << NSP) - 1);
    end_addr   = el.down ? '0 : last_addr;
    expect_w   = op_val ? mask : '0;
    mism       = (t_rdata ^ expect_w) & mask;
    last_op    = (opi == 1'(el.nops - 1));
    fail_col   = '0;
    for (int c = COLS - 1; c >= 0; c--)
      if (diff[c]) fail_col = col_t'(c);
  end

  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign finish    = (state == S_DONE);
  assign t_spare   = !phase_main;
  assign t_addr    = addr;
  assign t_we      = (state == S_RUN) && !op_rd;
  assign t_wdata   = op_val ? mask : '0;
  assign erm_s     = (state == S_RUN) && op_rd && !phase_main && (mism != '0);
  assign spare_fail = mism[NSP-1:0];
  assign erm_m     = (state == S_REPORT) && (diff != '0);
  assign f_address = '{row: addr, col: fail_col};

  // Next march position after the current operation.
  logic       n_opi;
  row_t       n_addr;
  logic [2:0] n_elem;
  logic       n_phase_end;

  always_comb begin
    n_opi       = 1'b0;
    n_addr      = addr;
    n_elem      = elem;
    n_phase_end = 1'b0;
    if (!last_op) begin
      n_opi = 1'b1;
    end else if (addr != end_addr) begin
      n_addr = el.down ? addr - 1'b1 : addr + 1'b1;
    end else if (elem != 3'(NELEM - 1)) begin
      n_elem = elem + 1'b1;
      n_addr = march(n_elem).down ? last_addr : '0;
    end else begin
      n_elem      = '0;
      n_addr      = '0;
      n_phase_end = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      phase_main <= 1'b0;
      elem       <= '0;
      opi        <= 1'b0;
      addr       <= '0;
      diff       <= '0;
      spare_done <= 1'b0;
    end else begin
      spare_done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state      <= S_RUN;
          phase_main <= 1'b0;
          elem       <= '0;
          opi        <= 1'b0;
          addr       <= '0;
        end
        S_RUN: begin
          if (op_rd && phase_main && (mism != '0)) begin
            diff  <= mism;
            state <= S_REPORT;
          end else begin
            opi  <= n_opi;
            addr <= n_addr;
            elem <= n_elem;
            if (n_phase_end) begin
              if (!phase_main) begin
                phase_main <= 1'b1;
                spare_done <= 1'b1;
              end else begin
                state <= S_DONE;
              end
            end
          end
        end
        S_REPORT: begin
          if (diff != '0) begin
            state <= S_WAIT;
          end else begin
            state <= S_RUN;
            opi  <= n_opi;
            addr <= n_addr;
            elem <= n_elem;
            if (n_phase_end) begin
              if (!phase_main) begin
                phase_main <= 1'b1;
                spare_done <= 1'b1;
              end else begin
                state <= S_DONE;
              end
            end
          end
        end
        S_WAIT: if (cnt) begin
          diff[fail_col] <= 1'b0;
          state          <= S_REPORT;
        end
        default: ;
      endcase
    end
  end


  // Handshake rules: a fault report is a one-cycle pulse, and the march does
  // not move while a report waits for cnt.
  a_erm_m_pulse: assert property (@(posedge clk) disable iff (rst) erm_m |=> !erm_m);
  a_hold_still:  assert property (@(posedge clk) disable iff (rst)
                                  (state == S_WAIT) |-> !t_we && $stable(addr));

endmodule
