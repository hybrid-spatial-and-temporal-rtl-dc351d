// tb_hist_axi_regs: self-checking test of the AXI4 register block.
// A bus-functional master reads the header, writes and reads back the
// common and per-channel registers (with byte strobes), checks the one-
// cycle FLUSH pulses, the readout and status registers, the Readout BRAM
// window (served by a reference memory model with one-cycle latency),
// unmapped reads, the read latency and response hold under back-pressure,
// INCR and FIXED bursts in both directions (IDs, RLAST, beat spacing,
// random RREADY back-pressure) and that no data beat is taken before its
// address.
module tb_hist_axi_regs;
  import hist_pkg::*;
  localparam int unsigned H = 128, N = 8, M = 16, T = 32, BTW = 5, IW = 7;

  logic clk = 0, rst_n = 0;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_wlast, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready, s_rlast;
  logic [3:0]  s_awid, s_bid, s_arid, s_rid;
  logic [7:0]  s_awlen, s_arlen;
  logic [1:0]  s_awburst, s_arburst;
  logic [17:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic enable;
  logic [M-1:0] threshold;
  logic [H-1:0] flush;
  logic [H-1:0][T-1:0] time_offset;
  logic [H-1:0][BTW-1:0] bit_trunc;
  logic head_valid;
  logic [IW-1:0] head_id;
  logic [IW:0] pending;
  logic [H-1:0] ch_ready, ch_holding, slot_busy;
  logic [IW+N-1:0] ram_raddr;
  logic [M-1:0] ram_rdata;

  int checks = 0, failures = 0;
  int flush_pulses = 0;
  logic [H-1:0] flush_seen;

  hist_axi_regs #(.H(H), .N(N), .M(M), .T(T)) dut (.*);

  always #5 clk = ~clk;

  // Readout BRAM stand-in: word a holds a*7+3
  always @(posedge clk) ram_rdata <= M'(int'(ram_raddr) * 7 + 3);

  always @(posedge clk) if (rst_n && flush != 0) begin
    flush_pulses++;
    flush_seen = flush;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // burst write: len+1 beats from wd[], burst type bt
  task automatic axi_write_burst(input logic [15:0] idx, input int len, input logic [1:0] bt,
                                 input logic [31:0] wd [256], input logic [3:0] strb = 4'hF);
    logic [3:0] id;
    id = 4'($urandom);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = {idx, 2'b00}; s_awlen = 8'(len); s_awburst = bt; s_awid = id;
    @(posedge clk);
    while (!s_awready) @(posedge clk);
    @(negedge clk);
    s_awvalid = 0;
    for (int k = 0; k <= len; k++) begin
      s_wvalid = 1; s_wdata = wd[k]; s_wstrb = strb; s_wlast = (k == len);
      @(posedge clk);
      while (!s_wready) @(posedge clk);
      @(negedge clk);
    end
    s_wvalid = 0; s_wlast = 0;
    while (!s_bvalid) @(negedge clk);
    chk(s_bresp == 2'b00 && s_bid == id, "write response OKAY with its id");
  endtask

  task automatic axi_write(input logic [15:0] idx, input logic [31:0] d,
                           input logic [3:0] strb = 4'hF);
    logic [31:0] wd [256];
    wd[0] = d;
    axi_write_burst(idx, 0, 2'b01, wd, strb);
  endtask

  // burst read: len+1 beats into rd[]; stall = clocks RREADY stays low on
  // each beat (negative: random); checks id, RLAST and the beat spacing
  task automatic axi_read_burst(input logic [15:0] idx, input int len, input logic [1:0] bt,
                                output logic [31:0] rd [256], input int stall = 0);
    logic [3:0] id;
    int lat;
    id = 4'($urandom);
    @(negedge clk);
    s_arvalid = 1; s_araddr = {idx, 2'b00}; s_arlen = 8'(len); s_arburst = bt; s_arid = id;
    s_rready = 0;
    @(posedge clk);
    while (!s_arready) @(posedge clk);
    @(negedge clk);
    s_arvalid = 0;
    for (int k = 0; k <= len; k++) begin
      int st;
      lat = 0;
      while (!s_rvalid) begin @(negedge clk); lat++; end
      chk(lat == 1, $sformatf("beat %0d valid 2 clocks after the address or the previous beat (got %0d)", k, lat + 1));
      st = (stall < 0) ? $urandom_range(0, 2) : stall;
      if (st > 0) begin
        logic [31:0] first;
        first = s_rdata;
        repeat (st) @(negedge clk);
        chk(s_rvalid && s_rdata == first, "read data held under back-pressure");
      end
      chk(s_rid == id && s_rlast == (k == len) && s_rresp == 2'b00, "read id, RLAST, OKAY");
      rd[k] = s_rdata;
      s_rready = 1;
      @(negedge clk);
      s_rready = 0;
    end
    s_rready = 1;
  endtask

  task automatic axi_read(input logic [15:0] idx, output logic [31:0] d,
                          input int stall = 0);
    logic [31:0] rd [256];
    axi_read_burst(idx, 0, 2'b01, rd, stall);
    d = rd[0];
  endtask

  initial begin
    logic [31:0] d;
    logic [T-1:0] offs [H];
    logic [BTW-1:0] bts [H];
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0; s_wlast = 0;
    s_awid = 0; s_arid = 0; s_awlen = 0; s_arlen = 0; s_awburst = 2'b01; s_arburst = 2'b01;
    head_valid = 0; head_id = 0; pending = 0;
    ch_ready = '0; ch_holding = '0; slot_busy = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    axi_read(HDR_MAGIC, d); chk(d == 32'h4849_5354, "magic");
    axi_read(HDR_H, d);     chk(d == H, "header H");
    axi_read(HDR_N, d);     chk(d == N, "header N");
    axi_read(HDR_M, d);     chk(d == M, "header M");
    axi_read(HDR_T, d);     chk(d == T, "header T");

    chk(!enable, "enable resets low");
    chk(threshold == 16'hFFFE, "threshold resets to 2^M-2");
    axi_write(REG_CTRL, 1); chk(enable, "enable set");
    axi_read(REG_CTRL, d);  chk(d == 1, "CTRL readback");
    axi_write(REG_THRESH, 32'h0000_1234); chk(threshold == 16'h1234, "threshold write");
    axi_write(REG_THRESH, 32'h0000_AB00, 4'b0010); chk(threshold == 16'hAB34, "threshold byte strobe");
    axi_read(REG_THRESH, d); chk(d == 32'hAB34, "THRESH readback");

    // FLUSH: one channel, then all
    flush_pulses = 0;
    axi_write(REG_FLUSH, 32'd77);
    repeat (2) @(negedge clk);
    chk(flush_pulses == 1 && flush_seen == (128'd1 << 77), "flush of channel 77 is one pulse");
    chk(flush == '0, "flush returns low");
    axi_write(REG_FLUSH, 32'h8000_0000);
    repeat (2) @(negedge clk);
    chk(flush_pulses == 2 && flush_seen == '1, "flush of all channels");
    axi_write(REG_FLUSH, 32'd500);
    repeat (2) @(negedge clk);
    chk(flush_pulses == 2, "flush of a channel beyond H ignored");

    // readout registers
    head_valid = 1; head_id = 7'd93; pending = 8'd5;
    axi_read(REG_RO_HEAD, d);  chk(d == 32'h8000_005D, "readout head");
    axi_read(REG_RO_COUNT, d); chk(d == 5, "readout count");
    head_valid = 0;
    axi_read(REG_RO_HEAD, d);  chk(d[31] == 0, "readout head empty");

    // per-channel registers
    for (int h = 0; h < H; h++) begin
      offs[h] = $urandom; bts[h] = BTW'($urandom_range(0, 24));
      axi_write(HREG_BASE + 16'(4 * h) + HF_TIME_OFFSET, offs[h]);
      axi_write(HREG_BASE + 16'(4 * h) + HF_BIT_TRUNC, 32'(bts[h]));
    end
    for (int h = 0; h < H; h++) begin
      chk(time_offset[h] == offs[h] && bit_trunc[h] == bts[h], $sformatf("channel %0d outputs", h));
      if (h % 9 == 0) begin
        axi_read(HREG_BASE + 16'(4 * h) + HF_TIME_OFFSET, d); chk(d == offs[h], "TIME_OFFSET readback");
        axi_read(HREG_BASE + 16'(4 * h) + HF_BIT_TRUNC, d);   chk(d == 32'(bts[h]), "BIT_TRUNC readback");
      end
    end
    axi_write(HREG_BASE + 16'(4 * 3), 32'hAABBCCDD, 4'b1000);
    chk(time_offset[3] == {8'hAA, offs[3][23:0]}, "TIME_OFFSET byte strobe");
    ch_ready[10] = 1; ch_holding[11] = 1; slot_busy[11] = 1;
    axi_read(HREG_BASE + 16'(4 * 10) + HF_STATUS, d); chk(d == 1, "status accepting");
    axi_read(HREG_BASE + 16'(4 * 11) + HF_STATUS, d); chk(d == 6, "status frozen, slot busy");

    // Readout BRAM window
    for (int i = 0; i < 200; i++) begin
      int a;
      a = (i < 4) ? (i == 0 ? 0 : (i == 1 ? 32767 : i * 256 + 255)) : $urandom_range(0, 32767);
      axi_read(RBRAM_BASE + 16'(a), d, (i % 17 == 0) ? 3 : 0);
      chk(d == ((a * 7 + 3) & 32'hFFFF), $sformatf("Readout BRAM word %0d got %h exp %h", a, d, M'(a * 7 + 3)));
    end

    // unmapped and writes to read-only space
    axi_read(16'h1234, d); chk(d == 0, "unmapped reads zero");
    axi_write(16'h8005, 32'hFFFF); axi_write(HDR_H, 32'd3);
    axi_read(HDR_H, d); chk(d == H, "header is read only");

    // bursts: INCR write over channel 0 and 1 registers
    begin
      logic [31:0] wd [256];
      logic [31:0] rd [256];
      for (int k = 0; k < 8; k++) wd[k] = 32'h1111_0000 + 32'(k);
      axi_write_burst(HREG_BASE, 7, 2'b01, wd);
      chk(time_offset[0] == 32'h1111_0000 && bit_trunc[0] == 5'(32'h1111_0001), "INCR write burst, channel 0");
      chk(time_offset[1] == 32'h1111_0004 && bit_trunc[1] == 5'(32'h1111_0005), "INCR write burst, channel 1");
      // FIXED write burst: every beat to THRESH, the last one stays
      wd[0] = 32'd10; wd[1] = 32'd20; wd[2] = 32'd30;
      axi_write_burst(REG_THRESH, 2, 2'b00, wd);
      chk(threshold == 16'd30, "FIXED write burst");
      // INCR read burst of one whole slot with random back-pressure
      axi_read_burst(RBRAM_BASE + 16'(5 * 256), 255, 2'b01, rd, -1);
      for (int k = 0; k < 256; k++)
        chk(rd[k] == (((5 * 256 + k) * 7 + 3) & 32'hFFFF), $sformatf("slot burst word %0d", k));
      // INCR read burst without stalls
      axi_read_burst(RBRAM_BASE + 16'(127 * 256 + 200), 55, 2'b01, rd, 0);
      for (int k = 0; k < 56; k++)
        chk(rd[k] == (((127 * 256 + 200 + k) * 7 + 3) & 32'hFFFF), $sformatf("last slot burst word %0d", k));
      // FIXED read burst repeats one register
      axi_read_burst(HDR_H, 3, 2'b00, rd, 0);
      chk(rd[0] == H && rd[1] == H && rd[2] == H && rd[3] == H, "FIXED read burst");
    end

    // a data beat is not taken before its address
    @(negedge clk);
    s_wvalid = 1; s_wdata = 32'd1; s_wstrb = 4'hF; s_wlast = 1;
    repeat (3) begin #1 chk(!s_wready, "no WREADY before the address"); @(negedge clk); end
    s_wvalid = 0; s_wlast = 0;
    axi_write(REG_CTRL, 0);
    chk(!enable, "enable cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
