// bira_tb: the redundancy analysis (FCR controller + FCR) driven directly
// with fault reports, as the BIST would send them.
//
// Checked against repair records worked out by hand for each scenario:
//  A. the 15-cell cluster of the global-block example, reported three times
//     over (as a march re-reads the cells): three essential column blocks,
//     two essential row blocks and one row block by the most-spare rule;
//  B. one faulty row spare and one faulty column spare loaded by load_cnt;
//  C. seven isolated faults with six spares: repair failure;
//  D. the most-spare rule picking column blocks when row spares run short.
// Also checked: cnt answers erm_m two cycles later, with hold high meanwhile,
// and the record stream is NSP cycles long.
module bira_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, erm_m, finish, load_cnt, hold, cnt, repair_fail, finish_r;
  cell_addr_t f_address;
  cnt_t err_count_r, err_count_c;
  shift_info_t shift_info;

  bira dut (.*);

  int checks = 0, failures = 0;
  shift_info_t recs [$];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reset_all(input int bad_r, input int bad_c);
    rst = 1'b1; erm_m = 1'b0; finish = 1'b0; load_cnt = 1'b0;
    err_count_r = '0; err_count_c = '0; f_address = '0;
    recs.delete();
    @(negedge clk);
    rst = 1'b0;
    err_count_r = cnt_t'(bad_r); err_count_c = cnt_t'(bad_c); load_cnt = 1'b1;
    @(negedge clk);
    load_cnt = 1'b0;
  endtask

  task automatic report(input int r, input int c);
    int lat = 0;
    f_address = '{row: row_t'(r), col: col_t'(c)};
    erm_m = 1'b1;
    @(negedge clk);
    erm_m = 1'b0;
    lat = 1;
    while (!cnt && lat < 20) begin
      checks++;
      if (!hold) begin failures++; $display("FAIL: hold low while judging"); end
      @(negedge clk);
      lat++;
    end
    check(lat == 2, $sformatf("cnt latency %0d", lat));
    @(negedge clk);
  endtask

  task automatic finish_and_collect(output int shift_cycles);
    int n = 0;
    shift_cycles = 0;
    finish = 1'b1;
    while (!finish_r && n < 100) begin
      @(posedge clk);
      if (dut.shift_to_CAM) shift_cycles++;
      if (shift_info.valid) recs.push_back(shift_info);
      @(negedge clk);
      n++;
    end
    finish = 1'b0;
  endtask

  function automatic shift_info_t rec(input logic is_col, input int line, input int bank);
    return '{valid: 1'b1, is_col: is_col, line: LNW'(line), bank: BKW'(bank)};
  endfunction

  task automatic expect_recs(input shift_info_t exp [$], input string tag);
    check(recs.size() == exp.size(), $sformatf("%s: %0d records, expected %0d", tag, recs.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < recs.size(); i++)
      check(recs[i] == exp[i], $sformatf("%s: record %0d is %h, expected %h", tag, i, recs[i], exp[i]));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sc;
  int cl_r [15] = '{8, 9, 10, 10, 11, 11, 11, 12, 12, 13, 13, 14, 15, 15, 15};
  int cl_c [15] = '{1, 5,  5,  6,  3,  4,  5,  6,  7,  6,  7,  7,  2,  3,  4};

  initial begin
    // A: cluster
    reset_all(0, 0);
    for (int pass = 0; pass < 3; pass++)
      for (int i = 0; i < 15; i++) report(cl_r[i], cl_c[i]);
    finish_and_collect(sc);
    check(finish_r && !repair_fail, "A: cluster repairable");
    check(sc == NSP, $sformatf("A: %0d shift cycles", sc));
    expect_recs('{rec(0, 11, 0), rec(0, 15, 0), rec(0, 8, 0),
                  rec(1, 5, 1), rec(1, 6, 1), rec(1, 7, 1)}, "A");

    // B: one faulty spare of each kind
    reset_all(1, 1);
    report(0, 0); report(0, 1); report(3, 9); report(5, 9); report(7, 15);
    finish_and_collect(sc);
    check(finish_r && !repair_fail, "B: repairable with 2+2 spares");
    expect_recs('{rec(0, 0, 0), rec(0, 7, 1), rec(1, 9, 0)}, "B");

    // C: seven isolated faults
    reset_all(0, 0);
    for (int i = 0; i < 7; i++) report(2*i, (3*i + 1) % COLS);
    check(repair_fail, "C: failure flagged at the seventh isolated fault");
    finish_and_collect(sc);
    check(finish_r && repair_fail, "C: finish_r with repair_fail");
    check(recs.size() == 0, "C: nothing shifted after a failure");

    // D: most-spare rule, 1 row spare vs 3 column spares
    reset_all(2, 0);
    report(1, 1); report(9, 12);
    finish_and_collect(sc);
    check(finish_r && !repair_fail, "D: repairable");
    expect_recs('{rec(1, 1, 0), rec(1, 12, 1)}, "D");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
