// output_accumulator: the last stage of the processor; it stores the
// transformed coefficients and hands them to the outside world.
//
// It is a first-in first-out store of DEPTH words. The control unit pushes
// one coefficient per cycle with push (never when full, checked by an
// assertion); count tells it how many words are held. Towards the outside,
// avail is the synchronous "data available" signal: while avail is high,
// data is the oldest stored coefficient, and it is consumed on a clock edge
// where ready is high. A push and a pop may happen in the same cycle. The
// block's role and its available signal are from the document; the FIFO
// organisation, its depth and the ready handshake are this design's choice.
module output_accumulator
  import dwt_pkg::*;
#(
  parameter int DEPTH = 4,
  localparam int PTR_W = $clog2(DEPTH),
  localparam int CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  coef_t            push_data,
  output logic [CNT_W-1:0] count,
  output logic             full,
  output logic             avail,
  input  logic             ready,
  output coef_t            data
);

  coef_t            store [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             pop;

  assign full  = (count == CNT_W'(DEPTH));
  assign avail = (count != '0);
  assign pop   = avail && ready;
  assign data  = store[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) store[i] <= '0;
    end else begin
      if (push) begin
        store[wr_ptr] <= push_data;
        wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + PTR_W'(1);
      end
      if (pop)
        rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + PTR_W'(1);
      case ({push, pop})
        2'b10:   count <= count + CNT_W'(1);
        2'b01:   count <= count - CNT_W'(1);
        default: count <= count;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop))
    else $error("output_accumulator: push while full");

endmodule
