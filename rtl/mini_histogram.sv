// mini_histogram: one histogram channel with a small M-bit "cache" histogram.
//
// A 2^N x M memory holds one counter per bin. Each accepted event adds one
// to its bin through a two-stage read-modify-write pipeline: in the cycle an
// event is presented its bin is read (registered read), in the next cycle the
// count plus one is written back. A one-entry forwarding register covers an
// event that hits the same bin as the one just before it, so the channel
// takes one event per clock with no stalls. The latency from an accepted
// event to the updated memory word is 2 clock cycles.
//
// The memory is only a cache of the full histogram: when a bin reaches the
// near-overflow threshold (or a read request arrives through `flush`) the
// channel freezes (ready low), raises `req` once its pipeline is empty, and
// on `grant` streams its 2^N bins out in bin order, one per clock
// (rd_valid/rd_bin/rd_data), clearing each one as it is read. It then
// resumes counting from an empty histogram. Events presented while ready is
// low are not counted; that is the dead time of the channel.
//
// Following the design: accumulator with +1 per event, 2-cycle latency at
// one event per clock, M-bit mini-histogram, transfer when a bin is near
// overflow. This design's own choices: the freeze-and-wait policy, the
// clamp of the threshold to 2^M-2 (so the one event still in flight when
// the threshold is hit cannot wrap a counter), the clear sweep after reset
// (2^N cycles, ready low) and the copy protocol.
module mini_histogram
  import hist_pkg::*;
#(
  parameter int unsigned N = 8,   // 2^N bins
  parameter int unsigned M = 16   // counter width
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         enable,     // acquisition enable
  input  logic [M-1:0] threshold,  // near-overflow count
  input  logic         flush,      // read request: freeze and transfer
  // event input
  input  logic         ev_valid,
  input  logic [N-1:0] ev_bin,
  output logic         ready,      // event is counted when ev_valid && ready
  // readout
  output logic         req,        // frozen and drained, asking for a copy
  input  logic         grant,      // one-cycle pulse starting the copy
  output logic         rd_valid,
  output logic [N-1:0] rd_bin,
  output logic [M-1:0] rd_data,
  output logic         holding     // frozen (waiting for or doing the copy)
);

  localparam logic [M-1:0] MAX_THR = {{(M-1){1'b1}}, 1'b0};  // 2^M - 2

  logic [M-1:0] mem [2**N];
  logic [M-1:0] q;             // registered read data
  ch_state_e    state;
  logic [N-1:0] sweep;         // clear / copy address
  logic         s1_valid;
  logic [N-1:0] s1_bin;
  logic         fw_valid;
  logic [N-1:0] fw_bin;
  logic [M-1:0] fw_data;

  logic [M-1:0] thr_eff;
  logic [M-1:0] cur, nxt;
  logic         accept;
  logic         hit_thr;
  logic [N-1:0] raddr;
  logic         we;
  logic [N-1:0] waddr;
  logic [M-1:0] wdata;

  always_comb begin
    thr_eff = (threshold > MAX_THR) ? MAX_THR : threshold;
    ready   = (state == CH_COUNT) && enable;
    accept  = ev_valid && ready;
    cur     = (fw_valid && fw_bin == s1_bin) ? fw_data : q;
    nxt     = cur + 1'b1;
    hit_thr = s1_valid && (nxt >= thr_eff);
    raddr   = (state == CH_COPY) ? sweep : ev_bin;
    // write port: clear during init/copy, increment otherwise
    if (state == CH_INIT || state == CH_COPY) begin
      we    = 1'b1;
      waddr = sweep;
      wdata = '0;
    end else begin
      we    = s1_valid;
      waddr = s1_bin;
      wdata = nxt;
    end
    req     = (state == CH_HOLD) && !s1_valid;
    holding = (state == CH_HOLD) || (state == CH_COPY);
    rd_data = q;
  end

  // memory: one read port, one write port, read-before-write
  always_ff @(posedge clk) begin
    q <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= CH_INIT;
      sweep    <= '0;
      s1_valid <= 1'b0;
      s1_bin   <= '0;
      fw_valid <= 1'b0;
      fw_bin   <= '0;
      fw_data  <= '0;
      rd_valid <= 1'b0;
      rd_bin   <= '0;
    end else begin
      s1_valid <= accept;
      s1_bin   <= ev_bin;
      rd_valid <= (state == CH_COPY);
      rd_bin   <= sweep;
      if (s1_valid) begin
        fw_valid <= 1'b1;
        fw_bin   <= s1_bin;
        fw_data  <= nxt;
      end
      unique case (state)
        CH_INIT: begin
          fw_valid <= 1'b0;
          sweep    <= sweep + 1'b1;
          if (&sweep) state <= CH_COUNT;
        end
        CH_COUNT: begin
          if (hit_thr || flush) state <= CH_HOLD;
        end
        CH_HOLD: begin
          if (grant && req) begin
            state <= CH_COPY;
            sweep <= '0;
          end
        end
        CH_COPY: begin
          fw_valid <= 1'b0;
          sweep    <= sweep + 1'b1;
          if (&sweep) state <= CH_COUNT;
        end
        default: state <= CH_INIT;
      endcase
    end
  end

  // No event may enter the pipeline unless the channel is counting, and a
  // counter never wraps.
  a_no_accept_when_frozen: assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> $past(state) == CH_COUNT);
  a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    s1_valid |-> cur != '1);

endmodule
