// bisr_random_tb: repair of random clustered defects, the case global spare
// blocks are meant for, on the full-size design.
//
// Each trial plants 4 to 24 stuck-at cells inside one randomly placed 8 x 8
// window of the main array, runs the whole self-repair flow and then:
//  * if the design reports `repairable`, writes a random pattern and its
//    complement to every row and reads both back; any wrong bit is a failure
//    (every planted cell must be covered);
//  * compares the verdict with an exhaustive search over all choices of at
//    most NSRB row blocks and NSCB column blocks. Claiming a repair that the
//    search finds impossible is a failure. Missing a repair the search finds
//    possible is allowed, since the allocation is a one-pass heuristic; those
//    cases are counted and printed as the repair rate.
module bisr_random_tb;
  import bisr_pkg::*;

  localparam int TRIALS = 80;

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

  // exhaustive check: can at most NSRB row blocks + NSCB column blocks cover
  // every planted cell? Row blocks are numbered r*NCB + column bank.
  function automatic bit coverable();
    int rbs [$];
    for (int r = 0; r < ROWS; r++)
      for (int cb = 0; cb < NCB; cb++) begin
        bit any = 0;
        for (int c = cb*BLK; c < (cb+1)*BLK; c++) any |= mm_sa_en[r*COLS+c];
        if (any) rbs.push_back(r*NCB + cb);
      end
    // try every subset of the faulty row blocks of size <= NSRB
    for (int mask = 0; mask < (1 << rbs.size()); mask++) begin
      if ($countones(mask) <= NSRB) begin
        int cbs [$];
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            if (mm_sa_en[r*COLS+c]) begin
              bit covered = 0;
              for (int i = 0; i < rbs.size(); i++)
                if (mask[i] && rbs[i] == r*NCB + c/BLK) covered = 1;
              if (!covered) begin
                int key = c*NRB + r/BLK;
                bit seen = 0;
                foreach (cbs[k]) if (cbs[k] == key) seen = 1;
                if (!seen) cbs.push_back(key);
              end
            end
        if (cbs.size() <= NSCB) return 1;
      end
    end
    return 0;
  endfunction

  task automatic readback(output int bad);
    word_t pat [ROWS];
    bad = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < ROWS; r++) begin
        if (pass == 0) pat[r] = word_t'($urandom); else pat[r] = ~pat[r];
        addr = row_t'(r); wdata = pat[r]; we = 1'b1;
        @(negedge clk);
      end
      we = 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        addr = row_t'(r);
        #1;
        if (rdata !== pat[r]) bad++;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rep = 0, n_opt = 0, n_trials = 0;

  initial begin
    srb_sa_en = '0; srb_sa_val = '0; scb_sa_en = '0; scb_sa_val = '0;
    we = 1'b0; addr = '0; wdata = '0; BISR_start = 1'b0;
    for (int t = 0; t < TRIALS; t++) begin
      int r0, c0, nf, r, c, cyc, bad;
      bit opt;
      r0 = $urandom_range(ROWS - 8, 0);
      c0 = $urandom_range(COLS - 8, 0);
      nf = $urandom_range(24, 4);
      mm_sa_en = '0; mm_sa_val = '0;
      for (int i = 0; i < nf; i++) begin
        r = r0 + $urandom_range(7, 0);
        c = c0 + $urandom_range(7, 0);
        mm_sa_en[r*COLS+c]  = 1'b1;
        mm_sa_val[r*COLS+c] = 1'($urandom);
      end
      opt = coverable();
      rst = 1'b1;
      repeat (2) @(negedge clk);
      rst = 1'b0; BISR_start = 1'b1;
      @(negedge clk);
      BISR_start = 1'b0;
      cyc = 0;
      while (!BISR_done && cyc < 5000) begin @(negedge clk); cyc++; end
      checks++;
      if (!BISR_done) begin failures++; $display("FAIL trial %0d: flow did not end", t); end
      n_trials++;
      if (opt) n_opt++;
      if (repairable) begin
        n_rep++;
        checks++;
        if (!opt) begin failures++; $display("FAIL trial %0d: repair claimed where none exists", t); end
        readback(bad);
        checks++;
        if (bad != 0) begin failures++; $display("FAIL trial %0d: %0d wrong words after repair", t, bad); end
      end
    end
    $display("random clusters: %0d trials, repairable by exhaustive search %0d, repaired %0d",
             n_trials, n_opt, n_rep);
    checks++;
    if (n_rep == 0) begin failures++; $display("FAIL: no trial was repaired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
