// spare_mem: storage of the global spare blocks.
//
// NSRB spare row blocks (GSRB) of BLK cells each and NSCB spare column blocks
// (GSCB) of BLK cells each. A spare row block stands in for one row block of
// the main array, so it is read and written as a whole (with per-bit write
// enables, so that the BIST can write it one cell at a time). A spare column
// block stands in for one column block: it holds one cell per row of a row
// bank, selected by the row offset `scb_off`, and each spare column block has
// its own write enable and data bit. Writes happen on the rising clock edge,
// reads are combinational.
//
// The three spares of each kind (GSRB 0-2, GSCB 0-2) follow the published
// scheme; the port organisation is this design's own. The *_sa_* ports plant stuck-at faults in spare cells, in the
// same way as in main_mem, and are tied to zero in normal use.
module spare_mem
  import bisr_pkg::*;
(
  input  logic                       clk,
  input  logic [NSRB-1:0][BLK-1:0]   srb_bwe,
  input  logic [NSRB-1:0][BLK-1:0]   srb_wdata,
  output logic [NSRB-1:0][BLK-1:0]   srb_q,
  input  off_t                       scb_off,
  input  logic [NSCB-1:0]            scb_we,
  input  logic [NSCB-1:0]            scb_wbit,
  output logic [NSCB-1:0]            scb_q,
  input  logic [NSRB-1:0][BLK-1:0]   srb_sa_en,
  input  logic [NSRB-1:0][BLK-1:0]   srb_sa_val,
  input  logic [NSCB-1:0][BLK-1:0]   scb_sa_en,
  input  logic [NSCB-1:0][BLK-1:0]   scb_sa_val
);

  logic [NSRB-1:0][BLK-1:0] srb;
  logic [NSCB-1:0][BLK-1:0] scb;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NSRB; k++)
      for (int b = 0; b < BLK; b++)
        if (srb_bwe[k][b]) srb[k][b] <= srb_wdata[k][b];
    for (int k = 0; k < NSCB; k++)
      if (scb_we[k]) scb[k][scb_off] <= scb_wbit[k];
  end

  always_comb begin
    for (int k = 0; k < NSRB; k++)
      srb_q[k] = (srb[k] & ~srb_sa_en[k]) | (srb_sa_val[k] & srb_sa_en[k]);
    for (int k = 0; k < NSCB; k++)
      scb_q[k] = scb_sa_en[k][scb_off] ? scb_sa_val[k][scb_off] : scb[k][scb_off];
  end

endmodule
