// main_mem_tb: random writes and reads of the main array against a reference
// copy, then planted stuck-at-0 and stuck-at-1 cells, which must read as
// their stuck value whatever is written while their neighbours still work.
module main_mem_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  row_t  addr;
  logic  we;
  word_t wdata, rdata;
  logic [ROWS*COLS-1:0] sa_en, sa_val;

  main_mem dut (.*);

  int checks = 0, failures = 0;
  word_t ref_mem [ROWS];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(input int r);
    word_t w = ref_mem[r];
    for (int c = 0; c < COLS; c++)
      if (sa_en[r*COLS+c]) w[c] = sa_val[r*COLS+c];
    return w;
  endfunction

  initial begin
    sa_en = '0; sa_val = '0; we = 1'b0; addr = '0; wdata = '0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      addr = row_t'(r); wdata = word_t'($urandom); we = 1'b1; ref_mem[r] = wdata;
    end
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin
        sa_en[3*COLS+7] = 1'b1;  sa_val[3*COLS+7] = 1'b1;
        sa_en[12*COLS+0] = 1'b1; sa_val[12*COLS+0] = 1'b0;
        sa_en[12*COLS+15] = 1'b1; sa_val[12*COLS+15] = 1'b1;
      end
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        addr = row_t'($urandom_range(ROWS-1, 0));
        we   = $urandom_range(1, 0) == 1;
        if (we) begin
          wdata = word_t'($urandom);
          ref_mem[addr] = wdata;
        end else begin
          #1;
          checks++;
          if (rdata !== expect_rd(addr)) begin
            failures++;
            $display("FAIL row %0d: %h expected %h", addr, rdata, expect_rd(addr));
          end
        end
      end
      @(negedge clk);
      we = 1'b0;
      // stuck cells after writing the opposite value
      addr = 4'd3; wdata = '0; we = 1'b1;
      @(negedge clk); we = 1'b0; ref_mem[3] = '0; #1;
      checks++;
      if (rdata[7] !== (pass == 1)) begin failures++; $display("FAIL stuck-at-1 cell"); end
      if (rdata !== expect_rd(3)) begin failures++; $display("FAIL row 3"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
