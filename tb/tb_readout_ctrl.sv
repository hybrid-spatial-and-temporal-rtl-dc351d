// tb_readout_ctrl: self-checking test of the readout controller.
// Behavioural channels raise req, wait for their grant and stream 2^N words
// (a pattern that encodes channel, bin and round). The test checks every
// Readout BRAM write (address = channel*2^N + bin, data), the order of the
// id queue against the order of completed copies, irq/head/pending, that a
// channel with a busy slot is never granted, round-robin order when all
// channels request at once, and that xfer_done frees the slot.
module tb_readout_ctrl;
  localparam int unsigned H = 8, N = 4, M = 8;
  localparam int unsigned IW = $clog2(H);
  localparam int unsigned NB = 2**N;

  logic clk = 0, rst_n = 0;
  logic [H-1:0] ch_req, ch_grant, ch_rd_valid;
  logic [H-1:0][N-1:0] ch_rd_bin;
  logic [H-1:0][M-1:0] ch_rd_data;
  logic ram_we;
  logic [IW+N-1:0] ram_waddr;
  logic [M-1:0] ram_wdata;
  logic irq, head_valid, xfer_done;
  logic [IW-1:0] head_id;
  logic [IW:0] pending;
  logic [H-1:0] slot_busy;

  int checks = 0, failures = 0;
  int round [H];
  int srnd [H];      // round being streamed
  int phase [H];     // 0 idle, 1 requesting, 3 streaming
  int pos [H];
  int done_q [$];    // channel ids in the order their copy finished
  int grant_q [$];
  int writes = 0;
  bit tb_busy [H];

  readout_ctrl #(.H(H), .N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] pat(input int ch, input int b, input int r);
    return M'(ch * 37 + b * 5 + r * 11 + 1);
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // behavioural channels
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int h = 0; h < H; h++) begin phase[h] = 0; pos[h] = 0; end
      ch_rd_valid <= '0;
    end else begin
      for (int h = 0; h < H; h++) begin
        ch_rd_valid[h] <= 1'b0;
        case (phase[h])
          1: if (ch_grant[h]) begin
               grant_q.push_back(h);
               chk(!tb_busy[h], $sformatf("grant to channel %0d with a busy slot", h));
               phase[h] = 3;
               pos[h] = 0;
               srnd[h] = round[h];
               round[h]++;
             end
          3: begin
               ch_rd_valid[h] <= 1'b1;
               ch_rd_bin[h]   <= N'(pos[h]);
               ch_rd_data[h]  <= pat(h, pos[h], srnd[h]);
               pos[h]++;
               if (pos[h] == NB) phase[h] = 0;
             end
          default: ;
        endcase
      end
    end
  end
  always_comb for (int h = 0; h < H; h++) ch_req[h] = (phase[h] == 1);

  // check the BRAM writes
  always @(posedge clk) if (rst_n && ram_we) begin
    int ch, b;
    ch = int'(ram_waddr >> N);
    b  = int'(ram_waddr % NB);
    writes++;
    chk(ram_wdata == pat(ch, b, srnd[ch]),
        $sformatf("data of ch %0d bin %0d", ch, b));
    if (b == NB - 1) begin done_q.push_back(ch); tb_busy[ch] = 1; end
  end

  task automatic request(input int h);
    @(negedge clk); phase[h] = 1;
  endtask

  // processor side: take one queued mini-histogram
  task automatic service(input int exp_id);
    int t0 = 0;
    while (!irq && t0 < 2000) begin @(negedge clk); t0++; end
    chk(irq && head_valid, "irq with a waiting mini-histogram");
    chk(int'(head_id) == exp_id, $sformatf("head id %0d expected %0d", head_id, exp_id));
    chk(slot_busy[head_id], "slot marked busy");
    xfer_done = 1; @(negedge clk); xfer_done = 0;
    tb_busy[exp_id] = 0;
    chk(!slot_busy[exp_id], "slot freed by xfer_done");
  endtask

  initial begin
    xfer_done = 0;
    ch_rd_bin = '0; ch_rd_data = '0;
    for (int h = 0; h < H; h++) begin round[h] = 0; tb_busy[h] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!irq && pending == 0, "idle after reset");

    // one channel; copy takes 2^N + 3 cycles from request to queue
    request(3);
    begin
      int t0 = 0;
      while (pending == 0 && t0 < 200) begin @(negedge clk); t0++; end
      chk(t0 == NB + 3, $sformatf("copy took %0d cycles, expected %0d", t0, NB + 3));
    end
    // the same channel again while its slot is busy: must wait
    request(3);
    repeat (3 * NB) @(negedge clk);
    chk(pending == 1 && phase[3] == 1, "channel with busy slot not granted");
    service(3);
    repeat (NB + 6) @(negedge clk);
    chk(pending == 1, "second copy done after slot freed");
    service(3);

    // all channels at once: round-robin from the channel after the last one
    for (int h = 0; h < H; h++) phase[h] = 1;
    while (done_q.size() < 2 + H) @(negedge clk);
    for (int k = 0; k < H; k++)
      chk(done_q[2 + k] == (4 + k) % H, $sformatf("round-robin order %0d: got %0d", k, done_q[2 + k]));
    chk(pending == H, "queue holds every channel");
    for (int k = 0; k < H; k++) service((4 + k) % H);
    chk(!irq && pending == 0, "queue empty after servicing");

    // random traffic
    for (int it = 0; it < 300; it++) begin
      int h;
      h = $urandom_range(0, H - 1);
      if (phase[h] == 0) phase[h] = 1;
      if (irq && $urandom_range(0, 3) == 0) begin int k; k = done_q.size() - int'(pending); service(done_q[k]); end
      @(negedge clk);
    end
    repeat (H * (NB + 4)) begin
      if (irq) begin int k; k = done_q.size() - int'(pending); service(done_q[k]); end
      @(negedge clk);
    end
    chk(writes == NB * done_q.size(), "every copy wrote every bin");
    chk(grant_q.size() == done_q.size(), "every grant completed");

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
