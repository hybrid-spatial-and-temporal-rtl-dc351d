// tb_mini_histogram: self-checking test of one histogram channel.
// Checks the clear sweep after reset, one event per clock with repeated
// bins (forwarding), the 2-cycle event-to-memory latency, the copy-and-clear
// readout (2^N words in bin order, one per clock), the near-overflow freeze
// at a low threshold and at the default threshold (no counter wraps), and a
// read request through flush.
module tb_mini_histogram;
  localparam int unsigned N = 8, M = 16;
  localparam int unsigned NB = 2**N;

  logic clk = 0, rst_n = 0;
  logic enable, flush, ev_valid, grant;
  logic [M-1:0] threshold;
  logic [N-1:0] ev_bin;
  logic ready, req, rd_valid, holding;
  logic [N-1:0] rd_bin;
  logic [M-1:0] rd_data;

  int checks = 0, failures = 0;
  longint unsigned expc [NB];
  int cyc = 0;

  mini_histogram #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // reference model: count what the channel accepted
  always @(posedge clk)
    if (rst_n && ev_valid && ready) expc[ev_bin]++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // request + grant + read all bins, compare with model, clear model
  task automatic readout(input string tag);
    int n = 0, t0, t_first = -1, t_last = -1;
    bit order_ok = 1, data_ok = 1;
    t0 = cyc;
    while (!req) begin
      @(negedge clk);
      if (cyc - t0 > 100) break;
    end
    chk(req, {tag, ": req raised"});
    grant = 1; @(negedge clk); grant = 0;
    t0 = cyc;
    while (n < NB && cyc - t0 < NB + 20) begin
      @(posedge clk); #1;
      if (rd_valid) begin
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
        if (int'(rd_bin) != n) order_ok = 0;
        if (longint'(rd_data) != expc[rd_bin]) begin
          data_ok = 0;
          $display("  bin %0d got %0d exp %0d", rd_bin, rd_data, expc[rd_bin]);
        end
        expc[rd_bin] = 0;
        n++;
      end
    end
    chk(n == NB, {tag, ": all bins read"});
    chk(order_ok, {tag, ": bin order"});
    chk(data_ok, {tag, ": bin counts"});
    chk(t_last - t_first == NB - 1, {tag, ": one bin per clock"});
    @(negedge clk);
  endtask

  initial begin
    enable = 0; flush = 0; ev_valid = 0; grant = 0; ev_bin = 0;
    threshold = {{(M-1){1'b1}}, 1'b0};
    foreach (expc[i]) expc[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    // clear sweep: not ready for 2^N cycles
    @(negedge clk);
    chk(!ready, "not ready during clear");
    repeat (NB) @(negedge clk);
    chk(ready, "ready after clear");

    // latency: one event, memory updated exactly 2 clocks later
    ev_valid = 1; ev_bin = 8'd5;
    @(posedge clk); #1 ev_valid = 0;
    chk(dut.mem[5] == 0, "not yet written after 1 clock");
    @(posedge clk); #1;
    chk(dut.mem[5] == 1, "written 2 clocks after the event");
    @(negedge clk);

    // random traffic, one event per clock, many repeats of the same bin
    for (int i = 0; i < 5000; i++) begin
      ev_valid = ($urandom_range(0, 9) != 0);
      if ($urandom_range(0, 2) == 0) ev_bin = ev_bin;
      else ev_bin = N'($urandom_range(0, 15));
      @(negedge clk);
    end
    ev_valid = 0;
    chk(ready, "still counting after random traffic");
    // read request
    flush = 1; @(negedge clk); flush = 0;
    chk(!ready && holding, "frozen after flush");
    readout("flush");
    repeat (2) @(negedge clk);
    chk(ready && !holding, "counting again after copy");
    chk(dut.mem[5] == 0 && dut.mem[0] == 0, "memory cleared by the copy");

    // low threshold: freeze when a bin reaches 20
    threshold = 20;
    ev_valid = 1; ev_bin = 8'd77;
    for (int i = 0; i < 40; i++) @(negedge clk);
    ev_valid = 0;
    chk(!ready, "frozen at threshold");
    chk(expc[77] == 20 || expc[77] == 21, $sformatf("accepted %0d events at threshold 20", expc[77]));
    readout("threshold 20");

    // default threshold: one bin driven past 2^M, nothing wraps
    threshold = {{(M-1){1'b1}}, 1'b0};
    repeat (2) @(negedge clk);
    ev_valid = 1; ev_bin = 8'd200;
    for (int i = 0; i < (1 << M) + 10; i++) @(negedge clk);
    ev_valid = 0;
    chk(expc[200] == (1 << M) - 1, $sformatf("bin saturates at %0d (got %0d)", (1 << M) - 1, expc[200]));
    readout("full bin");

    // threshold above 2^M-2 is clamped
    threshold = '1;
    repeat (2) @(negedge clk);
    ev_valid = 1; ev_bin = 8'd3;
    for (int i = 0; i < (1 << M) + 10; i++) begin
      @(negedge clk);
      ev_bin = (i % 2 == 0) ? 8'd3 : 8'd3;
    end
    ev_valid = 0;
    chk(expc[3] <= (1 << M) - 1, "no wrap with threshold all ones");
    readout("clamped threshold");

    // enable low: nothing counted
    enable = 0; ev_valid = 1; ev_bin = 1;
    repeat (10) @(negedge clk);
    chk(!ready, "not ready when disabled");
    ev_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
