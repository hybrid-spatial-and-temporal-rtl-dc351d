// histogram_wrapper: the programmable-logic side of a hybrid multi-channel
// histogrammer.
//
// H independent channels each turn timestamp pairs into a bin index
// (timestamp_binner) and count events at one per clock in a small M-bit
// histogram (mini_histogram). Because an M-bit counter is small, a channel
// whose bin gets near overflow is frozen and its mini-histogram is copied by
// readout_ctrl into its slot of the shared readout_bram, cleared, and
// restarted. The processor side (a soft CPU with a DMA engine, outside this
// module) is interrupted through irq, reads the channel id and the slot over
// AXI4 (hist_axi_regs), adds the counts into full-width histograms in
// external memory and pulses xfer_done. A read request written to the FLUSH
// register empties channels at the end of an acquisition.
//
// Interface: one clock (aclk) and synchronous active-low reset (aresetn) for
// everything; per channel ev_valid, meas, ref_ts in and ev_ready out (an
// event is counted when ev_valid, ev_ready and its time falls in the
// channel's range); irq and xfer_done to the processor side; the AXI4
// slave port (bursts, so a DMA engine can fetch a whole mini-histogram with
// one 2^N-beat read).
// Timing: an accepted event is in its counter two clocks later; a channel
// copy takes 2^N + 3 clocks; a channel stays frozen from the near-overflow
// hit until its copy is done.
// Following the design: H=128 channels, 2^8 bins, 16-bit mini-histogram
// counters, 32-bit timestamps, the address map, the copy through a shared
// Readout BRAM with channel ids, interrupt and transfer-completion signals.
// This design's own choices are listed in the blocks it is built from.
module histogram_wrapper #(
  parameter int unsigned H   = 128,  // channels
  parameter int unsigned N   = 8,    // 2^N bins per channel
  parameter int unsigned M   = 16,   // mini-histogram counter width
  parameter int unsigned T   = 32,   // timestamp width
  parameter int unsigned IDW = 4,    // AXI ID width
  parameter int unsigned BTW = $clog2(T),
  parameter int unsigned IW  = (H > 1) ? $clog2(H) : 1
) (
  input  logic                aclk,
  input  logic                aresetn,
  // timestamp inputs
  input  logic [H-1:0]        ev_valid,
  input  logic [H-1:0][T-1:0] meas,
  input  logic [H-1:0][T-1:0] ref_ts,
  output logic [H-1:0]        ev_ready,
  // processor side
  output logic                irq,
  input  logic                xfer_done,
  // AXI4 slave
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [IDW-1:0]      s_awid,
  input  logic [17:0]         s_awaddr,
  input  logic [7:0]          s_awlen,
  input  logic [1:0]          s_awburst,
  input  logic                s_wvalid,
  output logic                s_wready,
  input  logic [31:0]         s_wdata,
  input  logic [3:0]          s_wstrb,
  input  logic                s_wlast,
  output logic                s_bvalid,
  input  logic                s_bready,
  output logic [IDW-1:0]      s_bid,
  output logic [1:0]          s_bresp,
  input  logic                s_arvalid,
  output logic                s_arready,
  input  logic [IDW-1:0]      s_arid,
  input  logic [17:0]         s_araddr,
  input  logic [7:0]          s_arlen,
  input  logic [1:0]          s_arburst,
  output logic                s_rvalid,
  input  logic                s_rready,
  output logic [IDW-1:0]      s_rid,
  output logic [31:0]         s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rlast
);

  logic                  enable;
  logic [M-1:0]          threshold;
  logic [H-1:0]          flush;
  logic [H-1:0][T-1:0]   time_offset;
  logic [H-1:0][BTW-1:0] bit_trunc;

  logic [H-1:0]          bin_valid;
  logic [H-1:0][N-1:0]   bin;
  logic [H-1:0]          range_err;
  logic [H-1:0]          ch_req, ch_grant, ch_rd_valid, ch_holding;
  logic [H-1:0][N-1:0]   ch_rd_bin;
  logic [H-1:0][M-1:0]   ch_rd_data;

  logic                  ram_we;
  logic [IW+N-1:0]       ram_waddr, ram_raddr;
  logic [M-1:0]          ram_wdata, ram_rdata;
  logic                  head_valid;
  logic [IW-1:0]         head_id;
  logic [IW:0]           pending;
  logic [H-1:0]          slot_busy;

  // The 2^16-word map holds the Readout BRAM window in its upper half and
  // four words per channel in 0x4000..0x7FFF.
  if (H * (2 ** N) > 2 ** 15 || H > 4096) begin : g_size_check
    $error("histogram_wrapper: H * 2^N must not exceed 2^15 words");
  end

  for (genvar h = 0; h < H; h++) begin : g_ch
    timestamp_binner #(.T(T), .N(N), .BTW(BTW)) u_binner (
      .in_valid     (ev_valid[h]),
      .meas         (meas[h]),
      .ref_ts       (ref_ts[h]),
      .time_offset  (time_offset[h]),
      .bit_trunc    (bit_trunc[h]),
      .out_valid    (bin_valid[h]),
      .out_bin      (bin[h]),
      .out_range_err(range_err[h])
    );

    mini_histogram #(.N(N), .M(M)) u_hist (
      .clk      (aclk),
      .rst_n    (aresetn),
      .enable   (enable),
      .threshold(threshold),
      .flush    (flush[h]),
      .ev_valid (bin_valid[h]),
      .ev_bin   (bin[h]),
      .ready    (ev_ready[h]),
      .req      (ch_req[h]),
      .grant    (ch_grant[h]),
      .rd_valid (ch_rd_valid[h]),
      .rd_bin   (ch_rd_bin[h]),
      .rd_data  (ch_rd_data[h]),
      .holding  (ch_holding[h])
    );
  end

  readout_ctrl #(.H(H), .N(N), .M(M), .IW(IW)) u_ctrl (
    .clk        (aclk),
    .rst_n      (aresetn),
    .ch_req     (ch_req),
    .ch_grant   (ch_grant),
    .ch_rd_valid(ch_rd_valid),
    .ch_rd_bin  (ch_rd_bin),
    .ch_rd_data (ch_rd_data),
    .ram_we     (ram_we),
    .ram_waddr  (ram_waddr),
    .ram_wdata  (ram_wdata),
    .irq        (irq),
    .head_valid (head_valid),
    .head_id    (head_id),
    .pending    (pending),
    .xfer_done  (xfer_done),
    .slot_busy  (slot_busy)
  );

  readout_bram #(.H(H), .N(N), .M(M), .AW(IW + N)) u_rbram (
    .clk  (aclk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );

  hist_axi_regs #(.H(H), .N(N), .M(M), .T(T), .IDW(IDW), .BTW(BTW), .IW(IW)) u_regs (
    .clk        (aclk),
    .rst_n      (aresetn),
    .s_awvalid  (s_awvalid),
    .s_awready  (s_awready),
    .s_awid     (s_awid),
    .s_awaddr   (s_awaddr),
    .s_awlen    (s_awlen),
    .s_awburst  (s_awburst),
    .s_wvalid   (s_wvalid),
    .s_wready   (s_wready),
    .s_wdata    (s_wdata),
    .s_wstrb    (s_wstrb),
    .s_wlast    (s_wlast),
    .s_bvalid   (s_bvalid),
    .s_bready   (s_bready),
    .s_bid      (s_bid),
    .s_bresp    (s_bresp),
    .s_arvalid  (s_arvalid),
    .s_arready  (s_arready),
    .s_arid     (s_arid),
    .s_araddr   (s_araddr),
    .s_arlen    (s_arlen),
    .s_arburst  (s_arburst),
    .s_rvalid   (s_rvalid),
    .s_rready   (s_rready),
    .s_rdata    (s_rdata),
    .s_rid      (s_rid),
    .s_rresp    (s_rresp),
    .s_rlast    (s_rlast),
    .enable     (enable),
    .threshold  (threshold),
    .flush      (flush),
    .time_offset(time_offset),
    .bit_trunc  (bit_trunc),
    .head_valid (head_valid),
    .head_id    (head_id),
    .pending    (pending),
    .ch_ready   (ev_ready),
    .ch_holding (ch_holding),
    .slot_busy  (slot_busy),
    .ram_raddr  (ram_raddr),
    .ram_rdata  (ram_rdata)
  );

endmodule
