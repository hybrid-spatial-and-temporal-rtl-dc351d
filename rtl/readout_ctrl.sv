// readout_ctrl: moves full mini-histograms into the Readout BRAM and tells
// the processor about them.
//
// Channels that are frozen and drained raise req. Whenever the controller is
// idle it picks, round-robin from the channel after the last one served, a
// requesting channel whose Readout BRAM slot is free, and pulses its grant.
// The channel then streams its 2^N bins, which are written to slot
// channel*2^N + bin. When the last bin is written the channel id is pushed
// into an id queue, the slot is marked busy and irq (level) is raised while
// the queue is not empty. The processor reads the head id, fetches the slot
// (by DMA) and signals completion with a one-cycle xfer_done pulse, which
// pops the head and frees the slot. A channel whose slot is still busy stays
// frozen until it is freed.
//
// Following the design: near-overflow request (step 1), mini-histogram
// copied into the shared Readout BRAM tagged with the channel id, interrupt
// to the processor, transfer-completion signal (step 3). This design's own
// choices: round-robin arbitration, one slot per channel, the id queue and
// the level interrupt.
// Timing: grant one cycle after the request is chosen; a copy occupies the
// controller for 2^N + 3 cycles.
module readout_ctrl #(
  parameter int unsigned H  = 128,
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 16,
  parameter int unsigned IW = (H > 1) ? $clog2(H) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // channels
  input  logic [H-1:0]        ch_req,
  output logic [H-1:0]        ch_grant,
  input  logic [H-1:0]        ch_rd_valid,
  input  logic [H-1:0][N-1:0] ch_rd_bin,
  input  logic [H-1:0][M-1:0] ch_rd_data,
  // Readout BRAM write port
  output logic                ram_we,
  output logic [IW+N-1:0]     ram_waddr,
  output logic [M-1:0]        ram_wdata,
  // processor side
  output logic                irq,
  output logic                head_valid,
  output logic [IW-1:0]       head_id,
  output logic [IW:0]         pending,
  input  logic                xfer_done,
  output logic [H-1:0]        slot_busy
);

  logic          copying;
  logic [IW-1:0] cur;
  logic [IW-1:0] rr_ptr;
  logic          found;
  logic [IW-1:0] pick;

  logic [IW-1:0] fifo [H];
  logic [IW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;
  logic          last_word;

  // round-robin search starting at rr_ptr
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 0; k < H; k++) begin
      int unsigned idx;
      idx = (int'(rr_ptr) + k) % H;
      if (!found && ch_req[idx] && !slot_busy[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  always_comb begin
    ram_we    = copying && ch_rd_valid[cur];
    ram_waddr = {cur, ch_rd_bin[cur]};
    ram_wdata = ch_rd_data[cur];
    last_word = ram_we && (&ch_rd_bin[cur]);
    push      = last_word;
    pop       = xfer_done && (pending != '0);
    head_valid = (pending != '0);
    head_id   = fifo[rd_ptr];
    irq       = head_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      copying   <= 1'b0;
      cur       <= '0;
      rr_ptr    <= '0;
      ch_grant  <= '0;
      slot_busy <= '0;
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      pending   <= '0;
    end else begin
      ch_grant <= '0;
      if (!copying) begin
        if (found) begin
          ch_grant[pick] <= 1'b1;
          cur            <= pick;
          copying        <= 1'b1;
        end
      end else if (last_word) begin
        copying <= 1'b0;
        rr_ptr  <= (int'(cur) == H - 1) ? '0 : cur + 1'b1;
      end
      if (push) begin
        fifo[wr_ptr]   <= cur;
        wr_ptr         <= (int'(wr_ptr) == H - 1) ? '0 : wr_ptr + 1'b1;
        slot_busy[cur] <= 1'b1;
      end
      if (pop) begin
        rd_ptr                  <= (int'(rd_ptr) == H - 1) ? '0 : rd_ptr + 1'b1;
        slot_busy[fifo[rd_ptr]] <= 1'b0;
      end
      pending <= pending + (IW+1)'(push) - (IW+1)'(pop);
    end
  end

  // the queue can never hold more ids than there are slots
  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(pending) <= H);
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(ch_grant));

endmodule
