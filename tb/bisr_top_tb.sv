// bisr_top_tb: end-to-end test of the self-repair memory at its full size.
//
// Scenarios, each started from reset:
//  A. the clustered-fault example of the global-block scheme: 15 stuck-at-1
//     cells in row bank 1 / column bank 0 that need all three spare row
//     blocks and all three spare column blocks;
//  B. a faulty spare row block and a faulty spare column block, plus a
//     row-block pair, a column-block pair and a lone fault (stuck-at-0);
//  C. seven isolated faults, one more than there are spares: not repairable;
//  D. a fault-free memory.
// For every repairable scenario, mission mode is checked by writing random
// words to all rows and reading them back; the expected word is the written
// one. Defect-free cycle count of the flow is checked against the march
// length. The mechanisms (essential row and column repairs, most-spare
// assignment, repeat faults, faulty spares skipped, repair failure, remapped
// access) are counted, and one that never happens counts as a failure.
module bisr_top_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, BISR_start;
  logic BISR_done, repairable, bira_hold, match;
  row_t addr;
  logic we;
  word_t wdata, rdata;
  logic [ROWS*COLS-1:0] mm_sa_en, mm_sa_val;
  logic [NSRB-1:0][BLK-1:0] srb_sa_en, srb_sa_val;
  logic [NSCB-1:0][BLK-1:0] scb_sa_en, scb_sa_val;

  bisr_top dut (.*);

  int checks = 0, failures = 0;
  int n_row_ess = 0, n_col_ess = 0, n_most = 0, n_repeat = 0;
  int n_spare_flag = 0, n_fail = 0, n_match = 0, n_hold = 0;

  // mechanism monitors (hierarchical, observation only)
  always @(posedge clk) if (!rst) begin
    if (dut.u_bira.u_ctrl.state == 3'd1) begin  // judging a reported fault
      if (dut.u_bira.GSRB_repair) n_row_ess++;
      if (dut.u_bira.GSCB_repair) n_col_ess++;
      if (dut.u_bira.repaired)    n_repeat++;
    end
    if (dut.u_bira.use_entry && (dut.u_bira.GSRB_repair || dut.u_bira.GSCB_repair)) n_most++;
    if (dut.erm_s) n_spare_flag++;
    if (bira_hold) n_hold++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_faults();
    mm_sa_en = '0; mm_sa_val = '0;
    srb_sa_en = '0; srb_sa_val = '0; scb_sa_en = '0; scb_sa_val = '0;
  endtask

  task automatic put(input int r, input int c, input logic v);
    mm_sa_en[r*COLS+c]  = 1'b1;
    mm_sa_val[r*COLS+c] = v;
  endtask

  // reset, start the flow, wait for BISR_done; returns cycles start->done
  task automatic run_bisr(output int cycles);
    rst = 1'b1; BISR_start = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    BISR_start = 1'b1;
    @(negedge clk);
    BISR_start = 1'b0;
    cycles = 1;
    while (!BISR_done && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // write random words to every row, read them back
  task automatic mission_check(input string tag);
    word_t pat [ROWS];
    int bad = 0;
    for (int r = 0; r < ROWS; r++) begin
      pat[r] = word_t'($urandom);
      addr = row_t'(r); wdata = pat[r]; we = 1'b1;
      @(negedge clk);
    end
    we = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      addr = row_t'(r);
      #1;
      if (match) n_match++;
      if (rdata !== pat[r]) begin
        bad++;
        $display("  %s row %0d: read %h expected %h", tag, r, rdata, pat[r]);
      end
      @(negedge clk);
    end
    check(bad == 0, {tag, ": mission read-back through the remapped spares"});
  endtask

  int cyc, cyc_d;

  initial begin
    // watchdog
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; BISR_start = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    clear_faults();

    // ---- D: no faults; the flow length is the two march runs plus analysis
    run_bisr(cyc_d);
    check(BISR_done && repairable, "D: fault-free memory is repairable");
    // one cycle to leave idle, 10 march operations per word over the 8 spare
    // words and the 16 main words, one cycle for the BIRA to see `finish`,
    // one in the final assignment state and NSP shift cycles
    check(cyc_d == 1 + 10*BLK + 10*ROWS + 1 + 1 + NSP, $sformatf("D: flow length %0d cycles", cyc_d));
    mission_check("D");

    // ---- A: clustered faults (row bank 1, column bank 0)
    clear_faults();
    put(8, 1, 1);
    put(9, 5, 1);
    put(10, 5, 1); put(10, 6, 1);
    put(11, 3, 1); put(11, 4, 1); put(11, 5, 1);
    put(12, 6, 1); put(12, 7, 1);
    put(13, 6, 1); put(13, 7, 1);
    put(14, 7, 1);
    put(15, 2, 1); put(15, 3, 1); put(15, 4, 1);
    run_bisr(cyc);
    check(BISR_done && repairable, "A: cluster repaired with 3 GSRB + 3 GSCB");
    check(dut.u_bira.u_fcr.avail_r == 0 && dut.u_bira.u_fcr.avail_c == 0,
          "A: every spare used");
    mission_check("A");
    addr = row_t'(3); #1;
    check(!match, "A: row 3 has no remapping");
    addr = row_t'(11); #1;
    check(match, "A: row 11 is remapped");
    @(negedge clk);

    // ---- B: faulty spares are skipped
    clear_faults();
    srb_sa_en[0][4] = 1'b1; srb_sa_val[0][4] = 1'b0;   // GSRB 0 cell 4 stuck-at-0
    scb_sa_en[1][2] = 1'b1; scb_sa_val[1][2] = 1'b1;   // GSCB 1 cell 2 stuck-at-1
    put(0, 0, 0); put(0, 1, 0);        // row block pair
    put(3, 9, 0); put(5, 9, 0);        // column block pair
    put(7, 15, 0);                     // lone fault
    run_bisr(cyc);
    check(BISR_done && repairable, "B: repaired around faulty spares");
    check(dut.u_arcam.err_count_r == 1 && dut.u_arcam.err_count_c == 1,
          "B: one faulty spare of each kind flagged");
    mission_check("B");

    // ---- C: seven isolated faults, six spares
    clear_faults();
    for (int i = 0; i < 7; i++) put(2*i, (3*i + 1) % COLS, i[0]);
    run_bisr(cyc);
    check(BISR_done && !repairable, "C: seven isolated faults are not repairable");
    if (BISR_done && !repairable) n_fail++;

    // ---- mechanisms
    $display("mechanisms: row_essential=%0d col_essential=%0d most_spare=%0d repeat=%0d spare_flag=%0d fail=%0d match=%0d hold=%0d",
             n_row_ess, n_col_ess, n_most, n_repeat, n_spare_flag, n_fail, n_match, n_hold);
    check(n_row_ess > 0, "essential row-block repair happened");
    check(n_col_ess > 0, "essential column-block repair happened");
    check(n_most > 0, "most-spare assignment happened");
    check(n_repeat > 0, "repeat / covered fault ignored");
    check(n_spare_flag > 0, "spare fault flagged");
    check(n_fail > 0, "repair failure reported");
    check(n_match > 0, "remapped mission access happened");
    check(n_hold > 0, "BIST held by BIRA");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
