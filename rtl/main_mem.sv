// main_mem: the ROWS x COLS main memory array (16 words of 16 bits).
//
// A register-file style array: writes happen on the rising clock edge when
// `we` is high, reads are combinational from `addr`. The array size follows
// the published scheme; the word organisation (one row per word) and the
// asynchronous read are this design's choices.
//
// Manufacturing defects are modelled by the stuck-at ports: when
// sa_en[r*COLS+c] is set, cell (r,c) reads as sa_val[r*COLS+c] whatever was
// written. In normal use both ports are tied to zero; test benches use them
// to plant clustered faults for the self-repair logic to find.
module main_mem
  import bisr_pkg::*;
(
  input  logic                 clk,
  input  row_t                 addr,
  input  logic                 we,
  input  word_t                wdata,
  output word_t                rdata,
  input  logic [ROWS*COLS-1:0] sa_en,
  input  logic [ROWS*COLS-1:0] sa_val
);

  word_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  word_t fen, fval;

  always_comb begin
    fen   = sa_en[addr*COLS +: COLS];
    fval  = sa_val[addr*COLS +: COLS];
    rdata = (mem[addr] & ~fen) | (fval & fen);
  end

endmodule
