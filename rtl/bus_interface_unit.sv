// bus_interface_unit: the host's window into the DWT processor.
//
// A simple synchronous register-mapped slave. A bus write (sel and we high
// on a clock edge) to
//   REG_CTRL   bit 0 = 1 issues the start command (one-cycle start pulse),
//   REG_CONFIG sets the wavelet (bit 0: 0 = 5/3, 1 = 9/7) and the number of
//              decomposition levels (bits 3:1),
//   REG_PIXEL  stores the 8-bit pixel wdata[7:0] in the RAM at the pixel
//              pointer and advances the pointer,
//   REG_ADDR   loads the pixel pointer.
// Reads are combinational: REG_CTRL gives status {done, busy} in bits 1:0,
// REG_CONFIG the configuration, REG_ADDR the pointer. While the processor is
// busy, configuration, pixel and start writes are ignored. The unit's role
// (initialisation by write commands that select the transform and the
// number of levels, loading the image) is from the document; the register
// map and bus protocol are this design's choice.
module bus_interface_unit
  import dwt_pkg::*;
#(
  parameter int ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  // host bus
  input  logic              bus_sel,
  input  logic              bus_we,
  input  logic [1:0]        bus_addr,
  input  logic [15:0]       bus_wdata,
  output logic [15:0]       bus_rdata,
  // configuration and commands
  output filter_e           cfg_filter,
  output logic [2:0]        cfg_levels,
  output logic              start,
  // pixel write port towards the RAM
  output logic              pix_we,
  output logic [ADDR_W-1:0] pix_addr,
  output coef_t             pix_data,
  // status from the control unit
  input  logic              busy,
  input  logic              done
);

  logic        wr;
  reg_addr_e   reg_sel;
  logic [PIX_W-1:0] pixel;

  assign reg_sel = reg_addr_e'(bus_addr);
  assign wr      = bus_sel && bus_we && !busy;
  assign pixel   = bus_wdata[PIX_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_filter <= FILT_53;
      cfg_levels <= 3'd1;
      start      <= 1'b0;
      pix_we     <= 1'b0;
      pix_addr   <= '0;
      pix_data   <= '0;
    end else begin
      start  <= wr && reg_sel == REG_CTRL && bus_wdata[0];
      pix_we <= wr && reg_sel == REG_PIXEL;
      // the pointer moves after the pixel has gone to the RAM; a pointer
      // write in the same cycle takes precedence
      if (pix_we) pix_addr <= pix_addr + ADDR_W'(1);
      if (wr) begin
        unique case (reg_sel)
          REG_CONFIG: begin
            cfg_filter <= filter_e'(bus_wdata[0]);
            cfg_levels <= bus_wdata[3:1];
          end
          REG_PIXEL: pix_data <= coef_t'(pixel);
          REG_ADDR:  pix_addr <= bus_wdata[ADDR_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_sel)
      REG_CTRL:   bus_rdata = {14'd0, done, busy};
      REG_CONFIG: bus_rdata = {12'd0, cfg_levels, cfg_filter};
      REG_ADDR:   bus_rdata = 16'(pix_addr);
      default:    bus_rdata = '0;
    endcase
  end

endmodule
