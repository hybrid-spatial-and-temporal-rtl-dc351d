// tb_histogram_wrapper: end-to-end test of the histogrammer at its default
// size (128 channels, 256 bins, 16-bit mini-histograms, 32-bit timestamps).
//
// A behavioural processor side stands in for the soft CPU, its DMA engine
// and the external memory: on irq it reads the id of the waiting
// mini-histogram, reads the 256 words of its Readout BRAM slot in one AXI burst,
// adds them into 32-bit histograms and pulses xfer_done. Random timestamp
// pairs are fed to all channels; a reference model bins every event the
// design accepted (ev_valid && ev_ready) by division. At the end every
// channel is flushed and the 32-bit histograms must equal the reference.
//
// Phases: configuration over AXI (per-channel TIME_OFFSET/BIT_TRUNC as in
// the 128-channel contiguous setting, BIT_TRUNC 7), the 2-cycle latency and
// the copy time of one flushed channel, heavy traffic with a low
// near-overflow threshold (frozen channels, busy slots, arbitration
// contention, dead time), a single bin driven past 2^16 at the default
// threshold (counts only a 32-bit histogram can hold), then a flush of all
// channels. Each mechanism is counted and must occur.
module tb_histogram_wrapper;
  import hist_pkg::*;
  localparam int unsigned H = 128, N = 8, M = 16, T = 32;
  localparam int unsigned NB = 2**N;

  logic aclk = 0, aresetn = 0;
  logic [H-1:0] ev_valid, ev_ready;
  logic [H-1:0][T-1:0] meas, ref_ts;
  logic irq, xfer_done;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_wlast, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready, s_rlast;
  logic [3:0]  s_awid, s_bid, s_arid, s_rid;
  logic [17:0] s_awaddr, s_araddr;
  logic [7:0]  s_awlen, s_arlen;
  logic [1:0]  s_awburst, s_arburst;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;

  histogram_wrapper dut (.*);

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint unsigned golden [H][NB];
  longint unsigned ddr [H][NB];       // the 32-bit histograms of the processor side
  logic [T-1:0] cfg_off [H];
  int cfg_bt [H];
  bit bus_lock = 0;
  bit traffic = 0;
  int traffic_mode = 0;               // 0 random on all channels, 1 channel 0 one bin
  int proc_enable = 0;

  // mechanism counters
  int n_services = 0, n_freeze = 0, n_busy_wait = 0, n_contention = 0;
  int n_dead = 0, n_range = 0, n_forward = 0, n_big_bins = 0, n_flush_copies = 0;
  logic [H-1:0] holding_q, flush_q;
  int n_copies = 0;
  logic [H-1:0] acc_q;
  logic [H-1:0][N-1:0] bin_q;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic bit ref_bin(input logic [T-1:0] m, input logic [T-1:0] r,
                                 input int h, output int b);
    longint unsigned dt, q;
    dt = (longint'(m) - longint'(r)) & 64'hFFFF_FFFF;
    b = 0;
    if (dt < longint'(cfg_off[h])) return 0;
    q = (dt - longint'(cfg_off[h])) / (64'd1 << cfg_bt[h]);
    if (q >= NB) return 0;
    b = int'(q);
    return 1;
  endfunction

  // ---------------- AXI4 master ----------------
  task automatic lock_bus();
    while (bus_lock) @(negedge aclk);
    bus_lock = 1;
  endtask

  task automatic axi_write(input logic [15:0] idx, input logic [31:0] d);
    lock_bus();
    @(negedge aclk);
    s_awvalid = 1; s_awaddr = {idx, 2'b00}; s_awlen = 0; s_awburst = 2'b01; s_awid = 4'd1;
    @(posedge aclk);
    while (!s_awready) @(posedge aclk);
    @(negedge aclk);
    s_awvalid = 0;
    s_wvalid = 1; s_wdata = d; s_wstrb = 4'hF; s_wlast = 1;
    @(posedge aclk);
    while (!s_wready) @(posedge aclk);
    @(negedge aclk);
    s_wvalid = 0;
    while (!s_bvalid) @(negedge aclk);
    chk(s_bid == 4'd1, "write response id");
    bus_lock = 0;
  endtask

  // INCR burst of len+1 words starting at word idx
  task automatic axi_read_burst(input logic [15:0] idx, input int len,
                                output logic [31:0] d [NB]);
    lock_bus();
    @(negedge aclk);
    s_arvalid = 1; s_araddr = {idx, 2'b00}; s_arlen = 8'(len); s_arburst = 2'b01; s_arid = 4'd2;
    @(posedge aclk);
    while (!s_arready) @(posedge aclk);
    @(negedge aclk);
    s_arvalid = 0;
    for (int k = 0; k <= len; k++) begin
      while (!s_rvalid) @(negedge aclk);
      d[k] = s_rdata;
      chk(s_rid == 4'd2 && s_rlast == (k == len), "read burst id and last");
      @(negedge aclk);
    end
    bus_lock = 0;
  endtask

  task automatic axi_read(input logic [15:0] idx, output logic [31:0] d);
    logic [31:0] one [NB];
    axi_read_burst(idx, 0, one);
    d = one[0];
  endtask

  // ---------------- processor side (CPU + DMA + external memory) -------
  initial begin
    xfer_done = 0;
    forever begin
      @(negedge aclk);
      if (proc_enable != 0 && irq) begin
        logic [31:0] head;
        logic [31:0] slot [NB];
        int id;
        axi_read(REG_RO_HEAD, head);
        chk(head[31], "head valid under irq");
        id = int'(head[6:0]);
        // the DMA fetches the slot in one burst
        axi_read_burst(RBRAM_BASE + 16'(id * NB), NB - 1, slot);
        for (int b = 0; b < NB; b++) ddr[id][b] += longint'(slot[b]);
        @(negedge aclk);
        xfer_done = 1;
        @(negedge aclk);
        xfer_done = 0;
        n_services++;
      end
    end
  end

  // ---------------- event sources ----------------
  always @(negedge aclk) begin
    for (int h = 0; h < H; h++) begin
      logic [T-1:0] r, dt;
      int span;
      ev_valid[h] = 1'b0;
      r = $urandom;
      span = NB << cfg_bt[h];
      if (traffic && traffic_mode == 0) begin
        ev_valid[h] = ($urandom_range(0, 3) == 0);
        // mostly in range, sometimes before or after it, often a few hot bins
        case ($urandom_range(0, 9))
          0:       dt = cfg_off[h] - T'($urandom_range(1, 1000));
          1:       dt = cfg_off[h] + T'(span) + T'($urandom_range(0, 1000));
          2, 3, 4: dt = cfg_off[h] + T'(($urandom_range(0, 3) * 8 + 1) << cfg_bt[h]);
          default: dt = cfg_off[h] + T'($urandom_range(0, span - 1));
        endcase
      end else if (traffic && traffic_mode == 1) begin
        ev_valid[h] = (h == 0);
        dt = cfg_off[h] + T'(100 << cfg_bt[h]);
      end else begin
        dt = '0;
      end
      ref_ts[h] = r;
      meas[h]   = r + dt;
    end
  end

  // reference model and mechanism counters
  always @(posedge aclk) begin
    cyc++;
    if (aresetn) begin
      int b;
      for (int h = 0; h < H; h++) begin
        bit inr;
        inr = ref_bin(meas[h], ref_ts[h], h, b);
        if (ev_valid[h] && !inr) n_range++;
        if (ev_valid[h] && inr && !ev_ready[h]) n_dead++;
        if (ev_valid[h] && inr && ev_ready[h]) begin
          golden[h][b]++;
          if (acc_q[h] && bin_q[h] == N'(b)) n_forward++;
        end
        acc_q[h] = ev_valid[h] && inr && ev_ready[h];
        bin_q[h] = N'(b);
      end
      for (int h = 0; h < H; h++)
        if (dut.ch_holding[h] && !holding_q[h] && !flush_q[h])
          n_freeze++;
      holding_q = dut.ch_holding;
      flush_q = dut.flush;
      if (dut.u_ctrl.push) n_copies++;
      if ((dut.ch_req & dut.slot_busy) != '0) n_busy_wait++;
      if ($countones(dut.ch_req & ~dut.slot_busy) > 1) n_contention++;
    end
  end

  initial begin
    logic [31:0] d;
    int t0;
    ev_valid = '0; meas = '0; ref_ts = '0;
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0; s_wlast = 0;
    s_awid = 0; s_arid = 0; s_awlen = 0; s_arlen = 0; s_awburst = 2'b01; s_arburst = 2'b01;
    holding_q = '0; flush_q = '0; acc_q = '0; bin_q = '0;
    for (int h = 0; h < H; h++) begin
      cfg_off[h] = '0; cfg_bt[h] = 0;
      for (int b = 0; b < NB; b++) begin golden[h][b] = 0; ddr[h][b] = 0; end
    end
    repeat (4) @(negedge aclk);
    aresetn = 1;

    // configuration
    axi_read(HDR_H, d); chk(d == H, "header H");
    axi_read(HDR_N, d); chk(d == N, "header N");
    for (int h = 0; h < H; h++) begin
      cfg_off[h] = T'(1747626 + NB * h);
      cfg_bt[h]  = (h % 4 == 3) ? 15 : 7;
      axi_write(HREG_BASE + 16'(4 * h) + HF_TIME_OFFSET, cfg_off[h]);
      axi_write(HREG_BASE + 16'(4 * h) + HF_BIT_TRUNC, 32'(cfg_bt[h]));
    end
    axi_write(REG_CTRL, 1);
    repeat (NB + 4) @(negedge aclk);     // clear sweep
    chk(ev_ready == '1, "all channels ready after the clear sweep");

    // latency: one event on channel 5 in bin 9, memory word updated 2 clocks later
    @(negedge aclk);
    force ev_valid[5] = 1'b1;
    force meas[5] = cfg_off[5] + T'(9 << cfg_bt[5]);
    force ref_ts[5] = '0;
    @(posedge aclk); #1;
    release ev_valid[5]; release meas[5]; release ref_ts[5];
    chk(dut.g_ch[5].u_hist.mem[9] == 16'd0, "not counted after 1 clock");
    @(posedge aclk); #1;
    chk(dut.g_ch[5].u_hist.mem[9] == 16'd1, "counted 2 clocks after the event");

    // copy time of one flushed channel: flush pulse to irq = 2^N + 4 clocks
    proc_enable = 1;
    axi_write(REG_FLUSH, 32'd5);
    t0 = 0;
    @(negedge aclk);
    while (!irq && t0 < 1000) begin @(negedge aclk); t0++; end
    // the flush register is set in the clock the write is taken, the
    // channel freezes one clock later, is granted after one more, streams
    // 2^N words from the clock after, and the last word is queued one
    // clock after that; this loop starts counting two clocks after the write
    chk(t0 == NB + 3, $sformatf("flush to irq took %0d clocks after the write response", t0));
    n_flush_copies++;
    while (n_services < 1) @(negedge aclk);

    // heavy traffic, low near-overflow threshold
    axi_write(REG_THRESH, 32'd60);
    traffic = 1; traffic_mode = 0;
    repeat (30000) @(negedge aclk);
    traffic = 0;
    $display("after heavy traffic: services=%0d freezes=%0d", n_services, n_freeze);

    // default threshold, one bin past 2^16 on channel 0
    while (dut.ch_holding != '0 || irq) @(negedge aclk);
    axi_write(REG_THRESH, 32'h0000_FFFE);
    traffic = 1; traffic_mode = 1;
    repeat (70000) @(negedge aclk);
    traffic = 0;
    chk(golden[0][100] > 70000 - 400 && golden[0][100] < 70000,
        $sformatf("channel 0 dead time around one copy (counted %0d of 70000)", golden[0][100]));

    // end of acquisition: read request of all channels
    repeat (4) @(negedge aclk);
    axi_write(REG_CTRL, 0);
    axi_write(REG_FLUSH, 32'h8000_0000);
    n_flush_copies += H;
    repeat (10) @(negedge aclk);
    t0 = 0;
    while ((dut.ch_holding != '0 || irq) && t0 < 2_000_000) begin @(negedge aclk); t0++; end
    repeat (10) @(negedge aclk);
    chk(!irq && dut.ch_holding == '0, "all channels drained");

    // compare the 32-bit histograms with the reference
    begin
      int bad = 0;
      for (int h = 0; h < H; h++)
        for (int b = 0; b < NB; b++) begin
          if (ddr[h][b] >= (64'd1 << M)) n_big_bins++;
          checks++;
          if (ddr[h][b] != golden[h][b]) begin
            failures++; bad++;
            if (bad < 10) $display("FAIL ch %0d bin %0d: got %0d expected %0d", h, b, ddr[h][b], golden[h][b]);
          end
        end
    end

    $display("services=%0d freezes=%0d busy_waits=%0d contention=%0d dead=%0d out_of_range=%0d forwards=%0d bins_over_2^M=%0d flush_copies=%0d",
             n_services, n_freeze, n_busy_wait, n_contention, n_dead, n_range, n_forward, n_big_bins, n_flush_copies);
    chk(n_freeze > 0, "near-overflow freeze happened");
    chk(n_busy_wait > 0, "channel waited for a busy slot");
    chk(n_contention > 0, "several channels competed for the copy");
    chk(n_dead > 0, "events were lost in dead time");
    chk(n_range > 0, "out-of-range events were dropped");
    chk(n_forward > 0, "same-bin back-to-back events were forwarded");
    chk(n_big_bins > 0, "a bin exceeded the mini-histogram range");
    chk(n_copies == n_freeze + H + 1, $sformatf("copies %0d = freezes + flushes", n_copies));
    chk(n_services == n_copies, "every copy was serviced");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
