// hist_pkg: constants shared by the histogrammer blocks.
//
// The register map is a 2^16-word space seen through an AXI4 port
// (byte address = word index * 4, 32-bit data). Its regions follow the
// address map of the design: header at 0x0000, common registers at 0x0100,
// readout registers at 0x0200, an unmapped hole from 0x0300, per-channel
// histogram registers at 0x4000 and the Readout BRAM window from 0x8000 to
// 0xFFFF. The individual register offsets inside each region are this
// design's own choice.
package hist_pkg;

  // Region bases (word index)
  localparam logic [15:0] HDR_BASE     = 16'h0000;
  localparam logic [15:0] COMMON_BASE  = 16'h0100;
  localparam logic [15:0] READOUT_BASE = 16'h0200;
  localparam logic [15:0] UNMAP_BASE   = 16'h0300;
  localparam logic [15:0] HREG_BASE    = 16'h4000;
  localparam logic [15:0] RBRAM_BASE   = 16'h8000;

  // Header (read only)
  localparam logic [15:0] HDR_MAGIC    = 16'h0000;  // reads HIST_MAGIC
  localparam logic [15:0] HDR_H        = 16'h0001;  // number of channels
  localparam logic [15:0] HDR_N        = 16'h0002;  // bin address width
  localparam logic [15:0] HDR_M        = 16'h0003;  // counter width in the mini-histograms
  localparam logic [15:0] HDR_T        = 16'h0004;  // timestamp width
  localparam logic [31:0] HIST_MAGIC   = 32'h4849_5354;  // "HIST"

  // Common registers
  localparam logic [15:0] REG_CTRL     = 16'h0100;  // bit0: acquisition enable
  localparam logic [15:0] REG_THRESH   = 16'h0101;  // near-overflow count
  localparam logic [15:0] REG_FLUSH    = 16'h0102;  // write: read request (bit31 = all channels, else channel id)

  // Readout registers
  localparam logic [15:0] REG_RO_HEAD  = 16'h0200;  // bit31: a mini-histogram is waiting, low bits: its channel id
  localparam logic [15:0] REG_RO_COUNT = 16'h0201;  // number of mini-histograms waiting

  // Per-channel histogram registers: HREG_BASE + 4*channel + field
  localparam logic [1:0]  HF_TIME_OFFSET = 2'd0;
  localparam logic [1:0]  HF_BIT_TRUNC   = 2'd1;
  localparam logic [1:0]  HF_STATUS      = 2'd2;  // bit0 accepting events, bit1 waiting for readout, bit2 slot busy

  typedef enum logic [2:0] {
    RG_HEADER, RG_COMMON, RG_READOUT, RG_UNMAPPED, RG_HIST, RG_RBRAM
  } region_e;

  function automatic region_e decode_region(input logic [15:0] idx);
    if (idx[15])                 return RG_RBRAM;
    else if (idx[14])            return RG_HIST;
    else if (idx < COMMON_BASE)  return RG_HEADER;
    else if (idx < READOUT_BASE) return RG_COMMON;
    else if (idx < UNMAP_BASE)   return RG_READOUT;
    else                         return RG_UNMAPPED;
  endfunction

  typedef enum logic [1:0] {
    CH_INIT,   // clearing the memory after reset
    CH_COUNT,  // accumulating events
    CH_HOLD,   // frozen, waiting for the readout controller
    CH_COPY    // streaming out and clearing the mini-histogram
  } ch_state_e;

endpackage
