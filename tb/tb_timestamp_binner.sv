// tb_timestamp_binner: self-checking test of the timestamp-to-bin mapping.
// Random and directed (range edges, a 1.2 ns-bin setting) timestamp pairs
// are compared with a reference computed by division in 64-bit arithmetic.
module tb_timestamp_binner;
  localparam int unsigned T = 32, N = 8, BTW = 5;

  logic           in_valid;
  logic [T-1:0]   meas, ref_ts, time_offset;
  logic [BTW-1:0] bit_trunc;
  logic           out_valid, out_range_err;
  logic [N-1:0]   out_bin;
  int checks = 0, failures = 0;

  timestamp_binner #(.T(T), .N(N), .BTW(BTW)) dut (.*);

  task automatic check_one(input logic [T-1:0] m, input logic [T-1:0] r,
                           input logic [T-1:0] off, input int bt, input logic v);
    longint unsigned dt, q;
    logic exp_valid;
    logic [N-1:0] exp_bin;
    in_valid = v; meas = m; ref_ts = r; time_offset = off; bit_trunc = BTW'(bt);
    #1;
    dt = (longint'(m) - longint'(r)) & 64'hFFFF_FFFF;
    exp_valid = 1'b0;
    exp_bin   = '0;
    if (dt >= longint'(off)) begin
      q = (dt - longint'(off)) / (64'd1 << bt);
      if (q < (64'd1 << N)) begin
        exp_valid = v;
        exp_bin   = N'(q);
      end
    end
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_bin !== exp_bin) ||
        out_range_err !== (v && !exp_valid && 1'b1)) begin
      failures++;
      $display("FAIL m=%0d r=%0d off=%0d bt=%0d: got v=%0b bin=%0d err=%0b exp v=%0b bin=%0d",
               m, r, off, bt, out_valid, out_bin, out_range_err, exp_valid, exp_bin);
    end
  endtask

  initial begin
    // 1.2 ns bins from 64 ns with a 36.6 fs LSB: 70 ns -> bin 5
    check_one(32'd1912568, 32'd0, 32'd1747626, 15, 1'b1);
    if (out_bin != 8'd5) begin failures++; $display("FAIL 70 ns bin %0d", out_bin); end
    checks++;
    // edges of the range
    check_one(32'd1747626, 32'd0, 32'd1747626, 15, 1'b1);               // first bin
    check_one(32'd1747625, 32'd0, 32'd1747626, 15, 1'b1);               // just below
    check_one(32'd1747626 + (32'd256 << 15) - 1, 32'd0, 32'd1747626, 15, 1'b1);  // last bin
    check_one(32'd1747626 + (32'd256 << 15), 32'd0, 32'd1747626, 15, 1'b1);      // just beyond
    // reference subtraction wraps modulo 2^32
    check_one(32'd10, 32'hFFFF_FFF0, 32'd0, 0, 1'b1);
    check_one(32'd300, 32'd100, 32'd0, 0, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      logic [T-1:0] r, off;
      int bt;
      bt  = $urandom_range(0, 24);
      r   = $urandom;
      off = $urandom_range(0, 1 << 20);
      // mostly near the range so that bins are exercised
      check_one(r + off + ($urandom % (32'd300 << bt)), r, off, bt, 1'($urandom_range(0, 7) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
