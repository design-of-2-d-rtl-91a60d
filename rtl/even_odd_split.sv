// even_odd_split: split stage of the lifting scheme.
//
// Samples of one line arrive one per cycle on in_valid. Sample k is routed
// to the even temporary register bank (k even) or the odd bank (k odd) at
// index k/2: wr_even / wr_odd / wr_idx are the write strobes and address for
// those banks, valid in the same cycle as in_valid. When the len-th sample
// has been taken, load rises on the next clock edge and stays high, telling
// the lifting passes that the line is complete; further samples are ignored
// until clear. Reset or clear empties the split (count to zero, load low).
// Routing by index parity and the load flag follow the split-stage
// description; the clear input and the ignore-while-loaded rule are this
// design's choice.
module even_odd_split #(
  parameter int MAX_LEN = 64,
  localparam int LEN_W = $clog2(MAX_LEN + 1),
  localparam int IDX_W = $clog2(MAX_LEN / 2)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic [LEN_W-1:0] len,      // even, 2..MAX_LEN
  input  logic             in_valid,
  output logic             wr_even,
  output logic             wr_odd,
  output logic [IDX_W-1:0] wr_idx,
  output logic             load
);

  logic [LEN_W-1:0] count;
  logic             take;

  assign take    = in_valid && !load;
  assign wr_even = take && !count[0];
  assign wr_odd  = take &&  count[0];
  assign wr_idx  = IDX_W'(count >> 1);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= '0;
      load  <= 1'b0;
    end else if (take) begin
      if (count == len - LEN_W'(1)) begin
        count <= '0;
        load  <= 1'b1;
      end else begin
        count <= count + LEN_W'(1);
      end
    end
  end

endmodule
