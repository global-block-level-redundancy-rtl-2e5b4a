// ar: address reconfiguration, the data steering between the accessing side
// and the main array plus the global spare blocks.
//
// Three modes (`mode`):
//  * MODE_SPARE_TEST: the BIST port sees the spare blocks as BLK words of NSP
//    bits; word j holds cell j of each spare (bit k = GSRB k, bit NSRB+k =
//    GSCB k). Unused upper bits read as zero.
//  * MODE_MAIN_TEST: the BIST port reaches the main array directly, with no
//    remapping, so the faulty cells themselves are tested.
//  * MODE_MISSION: the mission port is served. The word is written to the main
//    array and, for every column bank or column the ARCAM maps to a spare, to
//    that spare as well. On a read each bit comes from its spare column block
//    if one serves it, else from the spare row block serving its column bank,
//    else from the main array.
// Purely combinational; the memories write on the next rising edge and read
// combinationally, so a mission read returns in the same cycle.
// The block is named after the AR box of the published BISR architecture;
// its insides are this design's own.
module ar
  import bisr_pkg::*;
(
  input  mode_e                    mode,
  // BIST port
  input  row_t                     t_addr,
  input  logic                     t_we,
  input  word_t                    t_wdata,
  output word_t                    t_rdata,
  // mission port
  input  row_t                     m_addr,
  input  logic                     m_we,
  input  word_t                    m_wdata,
  output word_t                    m_rdata,
  // ARCAM decision for m_addr
  input  remap_t [NCB-1:0]         row_map,
  input  remap_t [COLS-1:0]        col_map,
  // main array
  output row_t                     mm_addr,
  output logic                     mm_we,
  output word_t                    mm_wdata,
  input  word_t                    mm_rdata,
  // spare blocks
  output logic [NSRB-1:0][BLK-1:0] srb_bwe,
  output logic [NSRB-1:0][BLK-1:0] srb_wdata,
  input  logic [NSRB-1:0][BLK-1:0] srb_q,
  output off_t                     scb_off,
  output logic [NSCB-1:0]          scb_we,
  output logic [NSCB-1:0]          scb_wbit,
  input  logic [NSCB-1:0]          scb_q
);

  off_t j;

  // address side: depends only on the accessing ports
  assign j       = off_t'(t_addr);
  assign scb_off = (mode == MODE_SPARE_TEST) ? j : off_t'(m_addr);

  always_comb begin
    mm_addr   = m_addr;
    mm_we     = 1'b0;
    mm_wdata  = m_wdata;
    srb_bwe   = '0;
    srb_wdata = '0;
    scb_we    = '0;
    scb_wbit  = '0;

    case (mode)
      MODE_SPARE_TEST: begin
        for (int k = 0; k < NSRB; k++) begin
          srb_bwe[k][j]   = t_we;
          srb_wdata[k][j] = t_wdata[k];
        end
        for (int k = 0; k < NSCB; k++) begin
          scb_we[k]          = t_we;
          scb_wbit[k]        = t_wdata[NSRB+k];
        end
      end
      MODE_MAIN_TEST: begin
        mm_addr  = t_addr;
        mm_we    = t_we;
        mm_wdata = t_wdata;
      end
      default: begin
        mm_we = m_we;
        for (int cb = 0; cb < NCB; cb++)
          if (row_map[cb].hit) begin
            srb_bwe[row_map[cb].idx]   = {BLK{m_we}};
            srb_wdata[row_map[cb].idx] = m_wdata[cb*BLK +: BLK];
          end
        for (int c = 0; c < COLS; c++)
          if (col_map[c].hit) begin
            scb_we[col_map[c].idx]   = m_we;
            scb_wbit[col_map[c].idx] = m_wdata[c];
          end
      end
    endcase
  end

  // read side
  always_comb begin
    t_rdata = '0;
    m_rdata = mm_rdata;
    case (mode)
      MODE_SPARE_TEST: begin
        for (int k = 0; k < NSRB; k++) t_rdata[k]      = srb_q[k][j];
        for (int k = 0; k < NSCB; k++) t_rdata[NSRB+k] = scb_q[k];
      end
      MODE_MAIN_TEST: t_rdata = mm_rdata;
      default: begin
        for (int c = 0; c < COLS; c++) begin
          if (col_map[c].hit)
            m_rdata[c] = scb_q[col_map[c].idx];
          else if (row_map[c / BLK].hit)
            m_rdata[c] = srb_q[row_map[c / BLK].idx][c % BLK];
        end
      end
    endcase
  end

endmodule
