// arcam_tb: faulty-spare flags and counts, the transfer of repair records
// (which must skip faulty spares), and the mission-mode lookup, compared for
// every row with a lookup table kept by the test bench.
module arcam_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, erm_s, match;
  logic [NSP-1:0] spare_fail;
  cnt_t err_count_r, err_count_c;
  shift_info_t shift_info;
  row_t addr;
  remap_t [NCB-1:0] row_map;
  remap_t [COLS-1:0] col_map;

  arcam dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic shift_rec(input logic kind, input int ln, input int bk);
    @(negedge clk);
    shift_info = '{valid: 1'b1, is_col: kind, line: LNW'(ln), bank: BKW'(bk)};
    @(negedge clk);
    shift_info = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: row spares: GSRB0 faulty, so (4,cb1)->1, (13,cb0)->2
  //           col spares: GSCB1 faulty, so (col 2,rb0)->0, (col 14,rb1)->2
  function automatic remap_t exp_row(input int r, input int cb);
    if (r == 4 && cb == 1)  return '{hit: 1'b1, idx: SIW'(1)};
    if (r == 13 && cb == 0) return '{hit: 1'b1, idx: SIW'(2)};
    return '0;
  endfunction
  function automatic remap_t exp_col(input int r, input int c);
    if (c == 2 && r < BLK)   return '{hit: 1'b1, idx: SIW'(0)};
    if (c == 14 && r >= BLK) return '{hit: 1'b1, idx: SIW'(2)};
    return '0;
  endfunction

  initial begin
    rst = 1'b1; erm_s = 1'b0; spare_fail = '0; shift_info = '0; addr = '0;
    @(negedge clk);
    rst = 1'b0;
    check(err_count_r == 0 && err_count_c == 0, "counts clear after reset");
    // spare faults: GSRB 0 twice (counted once), GSCB 1
    erm_s = 1'b1; spare_fail = NSP'(1);
    @(negedge clk);
    spare_fail = NSP'(1) << (NSRB + 1);
    @(negedge clk);
    spare_fail = NSP'(1);
    @(negedge clk);
    erm_s = 1'b0;
    check(err_count_r == 1 && err_count_c == 1, "one faulty spare of each kind");
    // before any record: no match anywhere
    for (int r = 0; r < ROWS; r++) begin
      addr = row_t'(r); #1;
      check(!match, "no match before transfer");
    end
    shift_rec(0, 4, 1);
    shift_rec(0, 13, 0);
    @(negedge clk);
    shift_info = '{valid: 1'b0, is_col: 1'b0, line: LNW'(7), bank: '0};  // empty slot
    shift_rec(1, 2, 0);
    shift_rec(1, 14, 1);
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      logic any;
      addr = row_t'(r); #1;
      any = 1'b0;
      for (int cb = 0; cb < NCB; cb++) begin
        check(row_map[cb] == exp_row(r, cb), $sformatf("row_map row %0d bank %0d: %b", r, cb, row_map[cb]));
        any |= exp_row(r, cb).hit;
      end
      for (int c = 0; c < COLS; c++) begin
        check(col_map[c] == exp_col(r, c), $sformatf("col_map row %0d col %0d", r, c));
        any |= exp_col(r, c).hit;
      end
      check(match == any, $sformatf("match row %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
