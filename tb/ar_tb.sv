// ar_tb: the address-reconfiguration steering, checked combinationally in its
// three modes with random inputs against a reference written from the mode
// rules: spare test view, raw main-array test, and mission mode with random
// row and column remappings (column spare first, then row spare, then main).
module ar_tb;
  import bisr_pkg::*;

  mode_e mode;
  row_t  t_addr, m_addr, mm_addr;
  logic  t_we, m_we, mm_we;
  word_t t_wdata, t_rdata, m_wdata, m_rdata, mm_wdata, mm_rdata;
  remap_t [NCB-1:0]  row_map;
  remap_t [COLS-1:0] col_map;
  logic [NSRB-1:0][BLK-1:0] srb_bwe, srb_wdata, srb_q;
  off_t scb_off;
  logic [NSCB-1:0] scb_we, scb_wbit, scb_q;

  ar dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int j;
      word_t er;
      logic [NSRB-1:0][BLK-1:0] ebwe;
      logic [NSCB-1:0] ewe;
      mode     = mode_e'(i % 3);
      t_addr   = row_t'($urandom); m_addr = row_t'($urandom);
      t_we     = 1'($urandom);     m_we   = 1'($urandom);
      t_wdata  = word_t'($urandom); m_wdata = word_t'($urandom);
      mm_rdata = word_t'($urandom);
      srb_q    = (NSRB*BLK)'($urandom);
      scb_q    = NSCB'($urandom);
      row_map  = '0; col_map = '0;
      // at most one column per spare column block, one bank per spare row block
      for (int k = 0; k < NSRB; k++)
        if ($urandom_range(1, 0) == 1) row_map[$urandom_range(NCB-1, 0)] = '{hit: 1'b1, idx: SIW'(k)};
      for (int k = 0; k < NSCB; k++)
        if ($urandom_range(1, 0) == 1) col_map[$urandom_range(COLS-1, 0)] = '{hit: 1'b1, idx: SIW'(k)};
      #1;
      j = int'(t_addr) % BLK;
      case (mode)
        MODE_SPARE_TEST: begin
          er = '0;
          for (int k = 0; k < NSRB; k++) er[k] = srb_q[k][j];
          for (int k = 0; k < NSCB; k++) er[NSRB+k] = scb_q[k];
          ebwe = '0;
          for (int k = 0; k < NSRB; k++) ebwe[k][j] = t_we;
          check(t_rdata == er, "spare view read");
          check(srb_bwe == ebwe && scb_we == {NSCB{t_we}} && !mm_we, "spare view write enables");
          check(scb_off == off_t'(j), "spare view cell offset");
          for (int k = 0; k < NSRB; k++) check(srb_wdata[k][j] == t_wdata[k], "spare view row data");
          for (int k = 0; k < NSCB; k++) check(scb_wbit[k] == t_wdata[NSRB+k], "spare view column data");
        end
        MODE_MAIN_TEST: begin
          check(mm_addr == t_addr && mm_we == t_we && mm_wdata == t_wdata, "main test access");
          check(t_rdata == mm_rdata && srb_bwe == '0 && scb_we == '0, "main test read, spares idle");
        end
        default: begin
          er = mm_rdata;
          ebwe = '0; ewe = '0;
          for (int c = 0; c < COLS; c++) begin
            if (col_map[c].hit)            er[c] = scb_q[col_map[c].idx];
            else if (row_map[c / BLK].hit) er[c] = srb_q[row_map[c / BLK].idx][c % BLK];
          end
          for (int cb = 0; cb < NCB; cb++)
            if (row_map[cb].hit) begin
              ebwe[row_map[cb].idx] = {BLK{m_we}};
              check(srb_wdata[row_map[cb].idx] == m_wdata[cb*BLK +: BLK], "mission row spare data");
            end
          for (int c = 0; c < COLS; c++)
            if (col_map[c].hit) begin
              ewe[col_map[c].idx] = m_we;
              check(scb_wbit[col_map[c].idx] == m_wdata[c], "mission column spare data");
            end
          check(m_rdata == er, "mission read steering");
          check(srb_bwe == ebwe && scb_we == ewe, "mission spare write enables");
          check(mm_addr == m_addr && mm_we == m_we && mm_wdata == m_wdata, "mission main access");
          check(scb_off == off_t'(m_addr), "mission column spare offset");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
