// tb_readout_bram: self-checking test of the shared readout memory at its
// full size. Fills every slot with a pattern derived from its address,
// overwrites random words, and checks the data and the one-cycle read
// latency against a reference array.
module tb_readout_bram;
  localparam int unsigned H = 128, N = 8, M = 16;
  localparam int unsigned AW = $clog2(H) + N;
  localparam int unsigned WORDS = H * (2**N);

  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [M-1:0] wdata, rdata;
  logic [M-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  readout_bram #(.H(H), .N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] pattern(input int a);
    return M'(a * 40503 + 17);
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      we = 1; waddr = AW'(a); wdata = pattern(a); ref_mem[a] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 5000; i++) begin
      int a;
      a = $urandom_range(0, WORDS - 1);
      we = 1; waddr = AW'(a); wdata = M'($urandom); ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 20000; i++) begin
      int a;
      a = (i < WORDS) ? i : $urandom_range(0, WORDS - 1);
      raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, ref_mem[a]);
      end
      @(negedge clk);
    end
    // read latency: data follows the address by exactly one clock
    raddr = 0; @(negedge clk);
    raddr = 1; #1;
    checks++;
    if (rdata !== ref_mem[0]) begin failures++; $display("FAIL read latency"); end
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
