// tb_tof_pet_workload: the histogrammer at its default size (128 channels,
// 256 bins, 16-bit mini-histograms) on the measurement settings it was built
// for, with a behavioural processor side (interrupt, readout over AXI,
// 32-bit histograms, xfer_done) as in tb_histogram_wrapper.
//
// Run A, one channel of 1.2 ns bins: time-over-threshold values between
// 70 ns and 252 ns (36.6 fs timestamp LSB) on every channel, BIT_TRUNC = 15,
// TIME_OFFSET = 1747626 (64 ns). Every channel's 32-bit histogram must equal
// the reference, and no event may fall outside 64..371 ns.
//
// Run B, 128 channels as one fine histogram: the same values fed to all
// channels at once, BIT_TRUNC = 7 (4.69 ps bins), channel h starting at
// TIME_OFFSET = 1747626 + h*2^(N+BIT_TRUNC) so the windows are adjacent.
// Each event inside 64..217.6 ns must be counted by exactly one channel, and
// the 32768-bin concatenation must equal the reference.
//
// Run C, worst case for dead time: every channel receives an event in the
// same bin on every clock. Each channel accepts events at one per clock while
// counting (2^16-1 of them per fill), and the measured average accepted rate
// must lie between the clock rate and the lower bound
// F / (1 + T_service / T_fill), with T_service = H times the measured time
// the processor side needs per mini-histogram and T_fill = 2^M - 1 clocks.
module tb_tof_pet_workload;
  import hist_pkg::*;
  localparam int unsigned H = 128, N = 8, M = 16, T = 32;
  localparam int unsigned NB = 2**N;
  localparam longint unsigned BASE = 1747626;     // 64 ns at 36.6 fs
  localparam longint unsigned TOT_MIN = 1912568;  // 70 ns
  localparam longint unsigned TOT_MAX = 6885246;  // 252 ns

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
  longint unsigned ddr [H][NB];
  longint unsigned cfg_off [H];
  int cfg_bt [H];
  bit bus_lock = 0;
  int mode = 0;          // 0 idle, 1 same ToT on all channels, 2 fixed bin every clock
  longint unsigned n_events = 0, n_in_window = 0;
  longint unsigned n_accepted = 0;
  longint unsigned svc_cycles = 0, n_services = 0;
  logic [T-1:0] tot_now;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

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

  // ---------------- processor side ----------------
  initial begin
    xfer_done = 0;
    forever begin
      @(negedge aclk);
      if (irq) begin
        logic [31:0] head;
        logic [31:0] slot [NB];
        longint t0;
        int id;
        t0 = cyc;
        axi_read(REG_RO_HEAD, head);
        id = int'(head[6:0]);
        // the DMA fetches the slot in one burst
        axi_read_burst(RBRAM_BASE + 16'(id * NB), NB - 1, slot);
        for (int b = 0; b < NB; b++) ddr[id][b] += longint'(slot[b]);
        @(negedge aclk);
        xfer_done = 1;
        @(negedge aclk);
        xfer_done = 0;
        svc_cycles += longint'(cyc - t0);
        n_services++;
      end
    end
  end

  // ---------------- sources ----------------
  always @(negedge aclk) begin
    logic [T-1:0] tot;
    // a peaked spread: sum of two uniform values across 70..252 ns
    tot = T'(TOT_MIN + ($urandom % ((TOT_MAX - TOT_MIN) / 2)) + ($urandom % ((TOT_MAX - TOT_MIN) / 2)));
    tot_now = tot;
    for (int h = 0; h < H; h++) begin
      logic [T-1:0] r;
      r = $urandom;
      ev_valid[h] = (mode != 0);
      ref_ts[h] = r;
      if (mode == 1) meas[h] = r + tot;
      else           meas[h] = r + T'(cfg_off[h] + (longint'(37) << cfg_bt[h]));
    end
  end

  // reference model of accepted events
  always @(posedge aclk) begin
    cyc++;
    if (aresetn && mode != 0) begin
      int hits;
      hits = 0;
      n_events++;
      for (int h = 0; h < H; h++) begin
        longint unsigned dt, q;
        dt = (longint'(meas[h]) - longint'(ref_ts[h])) & 64'hFFFF_FFFF;
        if (dt >= cfg_off[h]) begin
          q = (dt - cfg_off[h]) >> cfg_bt[h];
          if (q < NB) begin
            hits++;
            if (ev_ready[h]) begin
              golden[h][q]++;
              n_accepted++;
            end
          end
        end
      end
      if (hits > 0) n_in_window++;
      if (mode == 1 && cfg_bt[1] == 7) chk(hits <= 1, $sformatf("adjacent windows do not overlap: %0d hits, off1 %0d off2 %0d", hits, cfg_off[1], cfg_off[2]));
    end
  end

  task automatic configure(input int bt, input bit adjacent);
    for (int h = 0; h < H; h++) begin
      cfg_bt[h]  = bt;
      cfg_off[h] = adjacent ? BASE + (longint'(h) << (N + bt)) : BASE;
      axi_write(HREG_BASE + 16'(4 * h) + HF_TIME_OFFSET, 32'(cfg_off[h]));
      axi_write(HREG_BASE + 16'(4 * h) + HF_BIT_TRUNC, 32'(bt));
    end
  endtask

  task automatic drain_and_compare(input string tag);
    int bad = 0;
    axi_write(REG_CTRL, 0);
    axi_write(REG_FLUSH, 32'h8000_0000);
    repeat (10) @(negedge aclk);
    while (dut.ch_holding != '0 || irq) @(negedge aclk);
    repeat (10) @(negedge aclk);
    for (int h = 0; h < H; h++)
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (ddr[h][b] != golden[h][b]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s ch %0d bin %0d: got %0d expected %0d", tag, h, b, ddr[h][b], golden[h][b]);
        end
        ddr[h][b] = 0; golden[h][b] = 0;
      end
  endtask

  initial begin
    logic [31:0] d;
    ev_valid = '0; meas = '0; ref_ts = '0;
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_bready = 1; s_rready = 1;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0; s_wlast = 0;
    s_awid = 0; s_arid = 0; s_awlen = 0; s_arlen = 0; s_awburst = 2'b01; s_arburst = 2'b01;
    for (int h = 0; h < H; h++) begin
      cfg_off[h] = 0; cfg_bt[h] = 0;
      for (int b = 0; b < NB; b++) begin golden[h][b] = 0; ddr[h][b] = 0; end
    end
    repeat (4) @(negedge aclk);
    aresetn = 1;
    repeat (NB + 4) @(negedge aclk);

    // ---- run A: 1.2 ns bins from 64 ns ----
    configure(15, 0);
    axi_write(REG_CTRL, 1);
    n_events = 0; n_in_window = 0; n_accepted = 0;
    mode = 1;
    repeat (20000) @(negedge aclk);
    mode = 0;
    chk(n_in_window == n_events, "run A: every 70..252 ns value is inside 64..371 ns");
    chk(n_accepted == longint'(H) * n_events, "run A: no dead time below the threshold");
    begin
      // 70 ns and 252 ns land in bins 5 and 156
      longint unsigned lo = 256, hi = 0;
      for (int b = 0; b < NB; b++) if (golden[0][b] != 0) begin
        if (b < lo) lo = b;
        if (b > hi) hi = b;
      end
      chk(lo >= 5 && hi <= 156, $sformatf("run A: occupied bins %0d..%0d within 5..156", lo, hi));
    end
    drain_and_compare("run A");

    // ---- run B: 128 adjacent channels of 4.69 ps bins ----
    configure(7, 1);
    axi_write(REG_CTRL, 1);
    n_events = 0; n_in_window = 0; n_accepted = 0;
    mode = 1;
    repeat (20000) @(negedge aclk);
    mode = 0;
    chk(n_accepted == n_in_window, "run B: each event in the window counted once");
    chk(n_in_window > n_events / 2 && n_in_window < n_events,
        $sformatf("run B: %0d of %0d events inside 64..217.6 ns", n_in_window, n_events));
    drain_and_compare("run B");

    // ---- run C: all channels, one bin, every clock ----
    configure(7, 0);
    axi_write(REG_CTRL, 1);
    n_events = 0; n_accepted = 0; svc_cycles = 0; n_services = 0;
    begin
      longint c0, c1;
      real rate, bound, t_svc;
      int run_len;
      int max_run;
      int cur_run;
      c0 = cyc;
      mode = 2;
      max_run = 0; cur_run = 0;
      repeat (500000) begin
        @(negedge aclk);
        if (ev_ready[0]) cur_run++; else cur_run = 0;
        if (cur_run > max_run) max_run = cur_run;
      end
      mode = 0;
      c1 = cyc;
      rate  = real'(n_accepted) / real'(H) / real'(c1 - c0);
      t_svc = real'(svc_cycles) / real'(n_services);
      bound = 1.0 / (1.0 + real'(H) * t_svc / real'((1 << M) - 1));
      $display("run C: accepted %.4f events/clock/channel, bound %.4f, service %.1f clocks, %0d services",
               rate, bound, t_svc, n_services);
      chk(max_run >= (1 << M) - 2, $sformatf("run C: a channel counted %0d events in a row", max_run));
      chk(rate >= bound && rate < 1.0, "run C: average rate within [bound, clock rate)");
      chk(n_services >= H, "run C: every channel was read out");
      run_len = 0;
    end
    drain_and_compare("run C");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
