// bist_tb: the BIST against a memory model kept in the test bench.
//
// The model holds the spare test view (BLK words of NSP bits) and the main
// array, each with planted stuck-at cells. Checked: the march length of a
// fault-free run (10 operations per word, one per cycle), one spare_done
// pulse between the two phases, the spare elements named by erm_s, and the
// cells reported by erm_m. March C- reads every cell three times expecting 0
// and twice expecting 1, so a stuck-at-1 cell must be reported three times
// and a stuck-at-0 cell twice. The BIST must not move while waiting for cnt,
// which the model answers after a random delay.
module bist_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, start, busy, finish, t_spare, t_we, erm_s, spare_done, erm_m, cnt;
  row_t t_addr;
  word_t t_wdata, t_rdata;
  logic [NSP-1:0] spare_fail;
  cell_addr_t f_address;

  bist dut (.*);

  int checks = 0, failures = 0;

  word_t main_m [ROWS];
  word_t spare_m [BLK];
  word_t m_en [ROWS], m_val [ROWS], s_en [BLK], s_val [BLK];

  always_comb begin
    if (t_spare) t_rdata = ((spare_m[t_addr[OFW-1:0]] & ~s_en[t_addr[OFW-1:0]]) |
                           (s_val[t_addr[OFW-1:0]] & s_en[t_addr[OFW-1:0]])) & word_t'((1 << NSP) - 1);
    else         t_rdata = (main_m[t_addr] & ~m_en[t_addr]) | (m_val[t_addr] & m_en[t_addr]);
  end

  always @(posedge clk) if (t_we) begin
    if (t_spare) spare_m[t_addr[OFW-1:0]] <= t_wdata;
    else         main_m[t_addr] <= t_wdata;
  end

  // cnt responder with random delay; checks the BIST holds still meanwhile
  int rep_cnt [ROWS][COLS];
  int spare_rep [NSP];
  int n_spare_done;
  logic waiting;
  int delay;
  row_t held_addr;

  always @(posedge clk) begin
    cnt <= 1'b0;
    if (rst) begin
      waiting <= 1'b0;
    end else begin
      if (spare_done) n_spare_done++;
      if (erm_s) for (int p = 0; p < NSP; p++) if (spare_fail[p]) spare_rep[p]++;
      if (erm_m) begin
        rep_cnt[f_address.row][f_address.col]++;
        waiting   <= 1'b1;
        delay      = $urandom_range(4, 0);
        held_addr <= t_addr;
      end else if (waiting) begin
        checks++;
        if (t_we || t_addr != held_addr) begin
          failures++;
          $display("FAIL: BIST moved while waiting for cnt");
        end
        if (delay == 0) begin
          cnt     <= 1'b1;
          waiting <= 1'b0;
        end else delay--;
      end
    end
  end

  task automatic run(output int cycles);
    rst = 1'b1; start = 1'b0;
    foreach (rep_cnt[r, c]) rep_cnt[r][c] = 0;
    foreach (spare_rep[p]) spare_rep[p] = 0;
    n_spare_done = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!finish && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, bad;

  initial begin
    foreach (m_en[r]) begin m_en[r] = '0; m_val[r] = '0; end
    foreach (s_en[j]) begin s_en[j] = '0; s_val[j] = '0; end
    cnt = 1'b0;

    // fault free
    run(cyc);
    check(finish, "fault-free run finishes");
    check(cyc == 10*BLK + 10*ROWS, $sformatf("march length %0d cycles", cyc));
    check(n_spare_done == 1, "one spare_done pulse");
    bad = 0;
    foreach (rep_cnt[r, c]) bad += rep_cnt[r][c];
    foreach (spare_rep[p]) bad += spare_rep[p];
    check(bad == 0, "no fault reported on a fault-free memory");

    // faults
    m_en[2][9] = 1'b1;  m_val[2][9] = 1'b1;     // SA1
    m_en[2][10] = 1'b1; m_val[2][10] = 1'b0;    // SA0, same word
    m_en[15][0] = 1'b1; m_val[15][0] = 1'b1;    // SA1
    m_en[7][15] = 1'b1; m_val[7][15] = 1'b0;    // SA0
    s_en[5][1] = 1'b1;  s_val[5][1] = 1'b1;     // GSRB 1, SA1
    s_en[0][4] = 1'b1;  s_val[0][4] = 1'b0;     // GSCB 1, SA0
    run(cyc);
    check(finish, "faulty run finishes");
    check(rep_cnt[2][9] == 3 && rep_cnt[15][0] == 3, "stuck-at-1 cells reported three times");
    check(rep_cnt[2][10] == 2 && rep_cnt[7][15] == 2, "stuck-at-0 cells reported twice");
    bad = 0;
    foreach (rep_cnt[r, c]) bad += rep_cnt[r][c];
    check(bad == 10, $sformatf("no other cell reported (%0d reports)", bad));
    check(spare_rep[1] == 3 && spare_rep[4] == 2, "faulty spares named by erm_s");
    check(spare_rep[0] + spare_rep[2] + spare_rep[3] + spare_rep[5] == 0, "good spares not named");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
