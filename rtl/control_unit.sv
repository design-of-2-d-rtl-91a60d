// control_unit: finite state machine that runs the multi-level 2-D DWT.
//
// How it works. While idle, the RAM port belongs to the bus interface (pixel
// loading). A start pulse latches the filter and the number of levels L
// (0 is taken as 1, values above MAX_LEVELS as MAX_LEVELS) and the
// decomposition runs level by level on the current low band, a square of
// S = IMG_SIZE >> (level-1) samples in the top-left corner of the RAM:
//   row pass:    each of the S rows is read from the RAM, sent through the
//                1-D transform module and written back in place (L half to
//                the left, H half to the right);
//   column pass: the same for each of the S columns (L half on top).
// After the column pass the top-left S/2 x S/2 square is LL of this level
// and becomes the input of the next. After level L the whole RAM, in raster
// order, is copied into the output accumulator, which the outside drains at
// its own pace (reads are only issued while the accumulator has room for
// them). Then done is raised and the unit is idle again.
//
// Interfaces: RAM port (one-cycle read latency), 1-D transform module
// (in_valid/in_data with in_ready; len results on out_valid), accumulator
// push with its fill count. busy is high from start to the end of the
// readout; done stays high from then until the next start.
//
// Timing: a line of S samples takes 2*S + 2 + P*S/2 cycles from its first
// read to its last write back, P = 2 for 5/3 and 4 for 9/7; the readout
// takes at least IMG_SIZE*IMG_SIZE + 1 cycles. The level-by-level scheme and the row-then-
// column order come from the document; the in-place memory layout, the
// clamping of L and the readout through the accumulator are this design's
// choice.
module control_unit
  import dwt_pkg::*;
#(
  parameter int IMG_SIZE   = 64,
  parameter int MAX_LEVELS = 6,
  parameter int ACC_DEPTH  = 4,
  localparam int ADDR_W = $clog2(IMG_SIZE * IMG_SIZE),
  localparam int LEN_W  = $clog2(IMG_SIZE + 1),
  localparam int POS_W  = $clog2(IMG_SIZE),
  localparam int CNT_W  = $clog2(ACC_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // commands and configuration from the bus interface
  input  logic              start,
  input  filter_e           cfg_filter,
  input  logic [2:0]        cfg_levels,
  output logic              busy,
  output logic              done,
  // pixel loading from the bus interface
  input  logic              pix_we,
  input  logic [ADDR_W-1:0] pix_addr,
  input  coef_t             pix_data,
  // RAM port
  output logic              ram_en,
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output coef_t             ram_wdata,
  input  coef_t             ram_rdata,
  // 1-D transform module
  output filter_e           line_filter,
  output logic [LEN_W-1:0]  line_len,
  output logic              line_in_valid,
  output coef_t             line_in_data,
  input  logic              line_in_ready,
  input  logic              line_out_valid,
  input  coef_t             line_out_data,
  // output accumulator
  output logic              acc_push,
  output coef_t             acc_data,
  input  logic [CNT_W-1:0]  acc_count,
  // observation
  output logic [2:0]        level,      // current level, 1-based
  output logic              col_pass    // 0: row pass, 1: column pass
);

  typedef enum logic [2:0] {C_IDLE, C_FEED, C_DRAIN, C_READOUT, C_FLUSH} cstate_e;

  cstate_e           state;
  filter_e           filt_r;
  logic [2:0]        levels_r;
  logic [LEN_W-1:0]  size;
  logic [POS_W-1:0]  line;
  logic [POS_W-1:0]  pos;
  logic              rd_pend;
  logic [ADDR_W-1:0] rd_ptr;
  logic [ADDR_W-1:0] line_addr;
  logic              issue_rd;
  logic [2:0]        levels_eff;

  assign busy        = (state != C_IDLE);
  assign line_filter = filt_r;
  assign line_len    = size;

  // number of levels actually run
  always_comb begin
    if (cfg_levels == 3'd0)                      levels_eff = 3'd1;
    else if (int'(cfg_levels) > MAX_LEVELS)      levels_eff = 3'(MAX_LEVELS);
    else                                         levels_eff = cfg_levels;
  end

  // address of sample pos on the current line
  assign line_addr = col_pass ? ADDR_W'({pos, line}) : ADDR_W'({line, pos});

  // readout: issue a read only if the accumulator can take it
  assign issue_rd = (state == C_READOUT) &&
                    (int'(acc_count) + int'(rd_pend) < ACC_DEPTH);

  always_comb begin
    ram_en    = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = line_addr;
    ram_wdata = line_out_data;
    unique case (state)
      C_IDLE: begin
        ram_en    = pix_we;
        ram_we    = pix_we;
        ram_addr  = pix_addr;
        ram_wdata = pix_data;
      end
      C_FEED:    ram_en = line_in_ready;
      C_DRAIN: begin
        ram_en = line_out_valid;
        ram_we = line_out_valid;
      end
      C_READOUT: begin
        ram_en   = issue_rd;
        ram_addr = rd_ptr;
      end
      default: ;
    endcase
  end

  assign line_in_data = ram_rdata;
  assign acc_data     = ram_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= C_IDLE;
      filt_r        <= FILT_53;
      levels_r      <= 3'd1;
      level         <= 3'd1;
      col_pass      <= 1'b0;
      size          <= LEN_W'(IMG_SIZE);
      line          <= '0;
      pos           <= '0;
      rd_pend       <= 1'b0;
      rd_ptr        <= '0;
      done          <= 1'b0;
      line_in_valid <= 1'b0;
      acc_push      <= 1'b0;
    end else begin
      line_in_valid <= (state == C_FEED) && line_in_ready;
      acc_push      <= issue_rd;
      rd_pend       <= issue_rd;
      unique case (state)
        C_IDLE: begin
          if (start) begin
            state    <= C_FEED;
            filt_r   <= cfg_filter;
            levels_r <= levels_eff;
            level    <= 3'd1;
            col_pass <= 1'b0;
            size     <= LEN_W'(IMG_SIZE);
            line     <= '0;
            pos      <= '0;
            done     <= 1'b0;
          end
        end
        C_FEED: begin
          if (line_in_ready) begin
            if (pos == POS_W'(size - LEN_W'(1))) begin
              pos   <= '0;
              state <= C_DRAIN;
            end else begin
              pos <= pos + POS_W'(1);
            end
          end
        end
        C_DRAIN: begin
          if (line_out_valid) begin
            if (pos == POS_W'(size - LEN_W'(1))) begin
              pos   <= '0;
              state <= C_FEED;
              if (line == POS_W'(size - LEN_W'(1))) begin
                line <= '0;
                if (!col_pass) begin
                  col_pass <= 1'b1;
                end else begin
                  col_pass <= 1'b0;
                  if (level == levels_r) begin
                    state   <= C_READOUT;
                    rd_ptr  <= '0;
                  end else begin
                    level <= level + 3'd1;
                    size  <= size >> 1;
                  end
                end
              end else begin
                line <= line + POS_W'(1);
              end
            end else begin
              pos <= pos + POS_W'(1);
            end
          end
        end
        C_READOUT: begin
          if (issue_rd) begin
            rd_ptr <= rd_ptr + ADDR_W'(1);
            if (rd_ptr == ADDR_W'(IMG_SIZE * IMG_SIZE - 1)) state <= C_FLUSH;
          end
        end
        C_FLUSH: begin
          // the last word is pushed this cycle
          state <= C_IDLE;
          done  <= 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_feed_len: assert property (@(posedge clk) disable iff (rst)
    (state == C_FEED) |-> (size >= LEN_W'(2)))
    else $error("control_unit: line shorter than two samples");

endmodule
