// spare_mem_tb: random per-bit writes of the spare row blocks and per-row
// writes of the spare column blocks against a reference copy, with and
// without planted stuck-at cells.
module spare_mem_tb;
  import bisr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NSRB-1:0][BLK-1:0] srb_bwe, srb_wdata, srb_q;
  off_t                     scb_off;
  logic [NSCB-1:0]          scb_we, scb_wbit, scb_q;
  logic [NSRB-1:0][BLK-1:0] srb_sa_en, srb_sa_val;
  logic [NSCB-1:0][BLK-1:0] scb_sa_en, scb_sa_val;

  spare_mem dut (.*);

  int checks = 0, failures = 0;
  logic [NSRB-1:0][BLK-1:0] rs;
  logic [NSCB-1:0][BLK-1:0] rc;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [NSRB-1:0][BLK-1:0] es;
    logic [NSCB-1:0]          ec;
    es = (rs & ~srb_sa_en) | (srb_sa_val & srb_sa_en);
    for (int k = 0; k < NSCB; k++)
      ec[k] = scb_sa_en[k][scb_off] ? scb_sa_val[k][scb_off] : rc[k][scb_off];
    checks++;
    if (srb_q !== es || scb_q !== ec) begin
      failures++;
      $display("FAIL srb %h/%h scb %b/%b off %0d", srb_q, es, scb_q, ec, scb_off);
    end
  endtask

  initial begin
    srb_sa_en = '0; srb_sa_val = '0; scb_sa_en = '0; scb_sa_val = '0;
    srb_bwe = '1; srb_wdata = '0; scb_we = '1; scb_wbit = '0;
    rs = '0; rc = '0;
    for (int j = 0; j < BLK; j++) begin
      scb_off = off_t'(j);
      @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      if (i == 200) begin
        srb_sa_en[1][6] = 1'b1; srb_sa_val[1][6] = 1'b1;
        scb_sa_en[2][0] = 1'b1; scb_sa_val[2][0] = 1'b0;
      end
      srb_bwe   = (NSRB*BLK)'($urandom);
      srb_wdata = (NSRB*BLK)'($urandom);
      scb_off   = off_t'($urandom);
      scb_we    = NSCB'($urandom);
      scb_wbit  = NSCB'($urandom);
      @(negedge clk);
      rs = (rs & ~srb_bwe) | (srb_wdata & srb_bwe);
      for (int k = 0; k < NSCB; k++) if (scb_we[k]) rc[k][scb_off] = scb_wbit[k];
      srb_bwe = '0; scb_we = '0;
      scb_off = off_t'($urandom);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
