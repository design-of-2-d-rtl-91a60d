// dwt2d_top: multi-level 2-D discrete wavelet transform processor for
// IMG_SIZE x IMG_SIZE grey-scale images, with the 5/3 or the 9/7 wavelet in
// lifting form.
//
// Structure (after the processor's block diagram): the bus interface unit
// takes configuration, start and pixels from the host; the control unit
// (an FSM) owns the single-port RAM unit and moves lines between it and the
// 1-D transform module (split into even/odd temporary registers, band-H and
// band-L lifting processors); results are written back into the RAM in
// place, so after each level the LL band sits in the top-left corner and is
// transformed again, up to the configured number of levels. At the end the
// whole coefficient image is copied, in raster order, through the output
// accumulator to the out_* port.
//
// Use: write REG_CONFIG, write REG_ADDR = 0 and then IMG_SIZE*IMG_SIZE
// pixels to REG_PIXEL in raster order, write 1 to REG_CTRL, and drain
// IMG_SIZE*IMG_SIZE words from out_data while out_avail and out_ready are
// high. REG_CTRL reads back {done, busy}. The output image is in the usual
// pyramid layout: at level l the LL, HL, LH and HH bands of size
// IMG_SIZE>>l occupy the top-left, top-right, bottom-left and bottom-right
// quadrants of the IMG_SIZE>>(l-1) square.
//
// IMG_SIZE must be a power of two and at least 2**MAX_LEVELS.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int IMG_SIZE   = 64,
  parameter int MAX_LEVELS = 6,
  parameter int ACC_DEPTH  = 4,
  localparam int ADDR_W = $clog2(IMG_SIZE * IMG_SIZE),
  localparam int LEN_W  = $clog2(IMG_SIZE + 1),
  localparam int CNT_W  = $clog2(ACC_DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst,
  // host bus
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [1:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  // coefficient output
  output coef_t       out_data,
  output logic        out_avail,
  input  logic        out_ready
);

  filter_e           cfg_filter;
  logic [2:0]        cfg_levels;
  logic              start, busy, done;
  logic              pix_we;
  logic [ADDR_W-1:0] pix_addr;
  coef_t             pix_data;

  logic              ram_en, ram_we;
  logic [ADDR_W-1:0] ram_addr;
  coef_t             ram_wdata, ram_rdata;

  filter_e           line_filter;
  logic [LEN_W-1:0]  line_len;
  logic              line_in_valid, line_in_ready, line_out_valid;
  coef_t             line_in_data, line_out_data;

  logic              acc_push;
  coef_t             acc_data;
  logic [CNT_W-1:0]  acc_count;
  logic              acc_full;

  logic [2:0]        level;
  logic              col_pass;

  bus_interface_unit #(.ADDR_W(ADDR_W)) u_biu (
    .clk        (clk),
    .rst        (rst),
    .bus_sel    (bus_sel),
    .bus_we     (bus_we),
    .bus_addr   (bus_addr),
    .bus_wdata  (bus_wdata),
    .bus_rdata  (bus_rdata),
    .cfg_filter (cfg_filter),
    .cfg_levels (cfg_levels),
    .start      (start),
    .pix_we     (pix_we),
    .pix_addr   (pix_addr),
    .pix_data   (pix_data),
    .busy       (busy),
    .done       (done)
  );

  control_unit #(
    .IMG_SIZE   (IMG_SIZE),
    .MAX_LEVELS (MAX_LEVELS),
    .ACC_DEPTH  (ACC_DEPTH)
  ) u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .start          (start),
    .cfg_filter     (cfg_filter),
    .cfg_levels     (cfg_levels),
    .busy           (busy),
    .done           (done),
    .pix_we         (pix_we),
    .pix_addr       (pix_addr),
    .pix_data       (pix_data),
    .ram_en         (ram_en),
    .ram_we         (ram_we),
    .ram_addr       (ram_addr),
    .ram_wdata      (ram_wdata),
    .ram_rdata      (ram_rdata),
    .line_filter    (line_filter),
    .line_len       (line_len),
    .line_in_valid  (line_in_valid),
    .line_in_data   (line_in_data),
    .line_in_ready  (line_in_ready),
    .line_out_valid (line_out_valid),
    .line_out_data  (line_out_data),
    .acc_push       (acc_push),
    .acc_data       (acc_data),
    .acc_count      (acc_count),
    .level          (level),
    .col_pass       (col_pass)
  );

  ram_unit #(.DEPTH(IMG_SIZE * IMG_SIZE)) u_ram (
    .clk   (clk),
    .en    (ram_en),
    .we    (ram_we),
    .addr  (ram_addr),
    .wdata (ram_wdata),
    .rdata (ram_rdata)
  );

  dwt_1d_unit #(.MAX_LEN(IMG_SIZE)) u_dwt1d (
    .clk       (clk),
    .rst       (rst),
    .filter    (line_filter),
    .len       (line_len),
    .in_valid  (line_in_valid),
    .in_data   (line_in_data),
    .in_ready  (line_in_ready),
    .out_valid (line_out_valid),
    .out_data  (line_out_data)
  );

  output_accumulator #(.DEPTH(ACC_DEPTH)) u_acc (
    .clk       (clk),
    .rst       (rst),
    .push      (acc_push),
    .push_data (acc_data),
    .count     (acc_count),
    .full      (acc_full),
    .avail     (out_avail),
    .ready     (out_ready),
    .data      (out_data)
  );

endmodule
