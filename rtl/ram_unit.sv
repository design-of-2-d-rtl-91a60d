// ram_unit: image and coefficient memory.
//
// Holds the input picture and, after each pass, the L and H coefficients in
// place, so that the LL band of one level is the input of the next. It is a
// single-port synchronous RAM of DEPTH words of COEF_W bits: on a clock edge
// with en high it writes wdata to addr when we is high, otherwise it reads
// addr and presents the word on rdata in the next cycle (one cycle read
// latency). Its contents are not cleared by reset. The memory's role comes
// from the document; the single port, the word width and the read latency
// are this design's choice.
module ram_unit
  import dwt_pkg::*;
#(
  parameter int DEPTH = 4096,
  localparam int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  coef_t             wdata,
  output coef_t             rdata
);

  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
