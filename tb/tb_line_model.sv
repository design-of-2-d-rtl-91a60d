// tb_line_model: stand-in for the 1-D transform module, used to test the
// control unit on its own. It takes len samples while in_ready is high,
// waits a few cycles, then returns len samples on consecutive cycles:
// output k is input len-1-k plus one. Reversing the line makes any row or
// column addressing error visible, and the +1 counts the passes applied.
module tb_line_model
  import dwt_pkg::*;
#(
  parameter int MAX_LEN = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [$clog2(MAX_LEN+1)-1:0] len,
  input  logic       in_valid,
  input  coef_t      in_data,
  output logic       in_ready,
  output logic       out_valid,
  output coef_t      out_data
);
  coef_t buffer [MAX_LEN];
  int cnt, wait_cnt, k;
  typedef enum {M_IN, M_WAIT, M_OUT} mstate_e;
  mstate_e st;

  assign in_ready  = (st == M_IN);
  assign out_valid = (st == M_OUT);
  assign out_data  = buffer[int'(len) - 1 - k] + coef_t'(1);

  always @(posedge clk) begin
    if (rst) begin
      st <= M_IN; cnt <= 0; k <= 0; wait_cnt <= 0;
    end else begin
      case (st)
        M_IN: if (in_valid) begin
          buffer[cnt] <= in_data;
          if (cnt == int'(len) - 1) begin cnt <= 0; st <= M_WAIT; wait_cnt <= 3; end
          else cnt <= cnt + 1;
        end
        M_WAIT: if (wait_cnt == 0) begin st <= M_OUT; k <= 0; end
                else wait_cnt <= wait_cnt - 1;
        M_OUT: if (k == int'(len) - 1) st <= M_IN; else k <= k + 1;
        default: st <= M_IN;
      endcase
    end
  end
endmodule
