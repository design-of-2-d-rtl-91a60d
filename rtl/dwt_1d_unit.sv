// dwt_1d_unit: one-dimensional lifting wavelet transform of one line (the
// transform module of the processor).
//
// How it works. A line of len samples (len even, 2..MAX_LEN) is taken one
// sample per cycle while in_ready is high. The split stage (even_odd_split)
// stores sample 2i in even[i] and sample 2i+1 in odd[i]; both banks are
// temporary registers cleared by reset. Once the whole line is in, the unit
// runs lifting passes over the banks in place, one sample per cycle:
//   5/3: H pass (predict, band_h_proc), then L pass (update, band_l_proc);
//   9/7: H(alpha), L(beta), H(gamma), L(delta).
// An H pass updates odd[0..h-1] from the even bank, an L pass updates
// even[0..h-1] from the odd bank (h = len/2). The line ends are extended
// symmetrically: X[len] = X[len-2] for the last H sample and Y[-1] = Y[1]
// for the first L sample. Finally the line is sent out, the h low-pass
// coefficients first and then the h high-pass coefficients (out_valid high
// for len consecutive cycles, no back-pressure).
//
// Number formats. In 5/3 mode the banks hold integers and the transform is
// the integer lifting of the document's equations. In 9/7 mode samples are
// loaded with FRAC fractional bits and rounded to integers on output. The
// 9/7 transform is the four lifting steps only; no final K scaling is
// applied.
//
// Timing: with P passes (2 for 5/3, 4 for 9/7) the first output comes
// P*h + 2 cycles after the cycle of the last input sample; a full line
// therefore occupies the unit for len + P*h + 2 + len cycles. filter and len
// must be held stable from the first input sample to the last output.
// The pass schedule, extension and output order follow the lifting scheme;
// the serial one-sample-per-cycle organisation and the timing are this
// design's own.
module dwt_1d_unit
  import dwt_pkg::*;
#(
  parameter int MAX_LEN = 64,
  localparam int LEN_W = $clog2(MAX_LEN + 1),
  localparam int IDX_W = $clog2(MAX_LEN / 2),
  localparam int HALF  = MAX_LEN / 2
) (
  input  logic             clk,
  input  logic             rst,
  input  filter_e          filter,
  input  logic [LEN_W-1:0] len,
  input  logic             in_valid,
  input  coef_t            in_data,
  output logic             in_ready,
  output logic             out_valid,
  output coef_t            out_data
);

  typedef enum logic [1:0] {S_LOAD, S_STEP, S_OUT} state_e;

  state_e           state;
  acc_t             even_r [HALF];
  acc_t             odd_r  [HALF];
  logic [1:0]       pass;
  logic [IDX_W-1:0] n;
  logic [LEN_W-1:0] k;
  logic [IDX_W-1:0] h_last;

  logic             wr_even, wr_odd, load;
  logic [IDX_W-1:0] wr_idx;
  logic             split_clear;
  acc_t             in_ext;

  acc_t             h_left, h_right, h_res;
  acc_t             l_left, l_right, l_res;
  logic             last_pass;
  acc_t             out_acc;
  logic [IDX_W-1:0] k_idx;

  assign in_ready    = (state == S_LOAD) && !load;
  assign split_clear = (state == S_LOAD) && load;
  assign h_last      = IDX_W'((len >> 1) - LEN_W'(1));
  assign last_pass   = (filter == FILT_53) ? (pass == 2'd1) : (pass == 2'd3);
  assign in_ext      = (filter == FILT_53) ? acc_t'(in_data) : (acc_t'(in_data) <<< FRAC);

  even_odd_split #(.MAX_LEN(MAX_LEN)) u_split (
    .clk      (clk),
    .rst      (rst),
    .clear    (split_clear),
    .len      (len),
    .in_valid (in_valid && state == S_LOAD),
    .wr_even  (wr_even),
    .wr_odd   (wr_odd),
    .wr_idx   (wr_idx),
    .load     (load)
  );

  // Neighbour selection with symmetric extension at the line ends.
  always_comb begin
    h_left  = even_r[n];
    h_right = (n == h_last) ? even_r[n] : even_r[IDX_W'(n + IDX_W'(1))];
    l_left  = (n == '0) ? odd_r[0] : odd_r[IDX_W'(n - IDX_W'(1))];
    l_right = odd_r[n];
  end

  band_h_proc u_band_h (
    .filter      (filter),
    .second_step (pass[1]),
    .center      (odd_r[n]),
    .left        (h_left),
    .right       (h_right),
    .result      (h_res)
  );

  band_l_proc u_band_l (
    .filter      (filter),
    .second_step (pass[1]),
    .center      (even_r[n]),
    .left        (l_left),
    .right       (l_right),
    .result      (l_res)
  );

  // Output: low band from the even bank, then high band from the odd bank.
  always_comb begin
    k_idx = (k < (len >> 1)) ? IDX_W'(k) : IDX_W'(k - (len >> 1));
    out_acc = (k < (len >> 1)) ? even_r[k_idx] : odd_r[k_idx];
    if (filter == FILT_97)
      out_acc = (out_acc + acc_t'(1 << (FRAC - 1))) >>> FRAC;
  end

  assign out_valid = (state == S_OUT);
  assign out_data  = sat_coef(out_acc);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      pass  <= '0;
      n     <= '0;
      k     <= '0;
      for (int i = 0; i < HALF; i++) begin
        even_r[i] <= '0;
        odd_r[i]  <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: begin
          if (wr_even) even_r[wr_idx] <= in_ext;
          if (wr_odd)  odd_r[wr_idx]  <= in_ext;
          if (load) begin
            state <= S_STEP;
            pass  <= '0;
            n     <= '0;
          end
        end
        S_STEP: begin
          if (!pass[0]) odd_r[n]  <= h_res;
          else          even_r[n] <= l_res;
          if (n == h_last) begin
            n <= '0;
            if (last_pass) begin
              state <= S_OUT;
              k     <= '0;
            end else begin
              pass <= pass + 2'd1;
            end
          end else begin
            n <= n + IDX_W'(1);
          end
        end
        S_OUT: begin
          if (k == len - LEN_W'(1)) state <= S_LOAD;
          else                      k <= k + LEN_W'(1);
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Handshake rules: samples only while the unit is taking a line, and
  // lines of even length within the banks.
  a_in_ready: assert property (@(posedge clk) disable iff (rst) in_valid |-> in_ready)
    else $error("dwt_1d_unit: sample offered while not ready");
  a_len_ok: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> (!len[0] && len >= LEN_W'(2) && len <= LEN_W'(MAX_LEN)))
    else $error("dwt_1d_unit: line length must be even and 2..MAX_LEN");

endmodule
