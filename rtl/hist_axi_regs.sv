// hist_axi_regs: the AXI4 slave and register map of the histogrammer.
//
// The map is a space of 2^16 32-bit words; the word index is the byte
// address divided by four (AXI address bits [17:2]). Regions:
//   0x0000 header (read only): magic, H, N, M, T
//   0x0100 common: CTRL (bit0 enable), THRESH (near-overflow count),
//          FLUSH (write only: bit31 requests a readout of every channel,
//          otherwise the low bits name one channel)
//   0x0200 readout: HEAD (bit31 valid, low bits channel id of the oldest
//          mini-histogram waiting in the Readout BRAM), COUNT (how many wait)
//   0x0300-0x3FFF unmapped (reads 0, writes ignored)
//   0x4000 + 4*h + f: channel h; f=0 TIME_OFFSET, f=1 BIT_TRUNC,
//          f=2 status (read only: bit0 accepting, bit1 frozen, bit2 slot busy)
//   0x8000 + h*2^N + b: Readout BRAM, bin b of channel h (read only)
// The region bases, the AXI4 protocol and the TIME_OFFSET/BIT_TRUNC registers
// follow the design; the register offsets, the reset values, the ID width
// and the burst support below are this design's choices.
//
// Protocol: 32-bit data, one transaction at a time per direction. Bursts of
// up to 256 beats of 4 bytes; FIXED repeats the address, INCR and WRAP step
// it by one word (WRAP is treated as INCR, which is what a DMA engine
// issues anyway). AxSIZE, AxLOCK, AxCACHE, AxPROT and AxQOS are not used;
// the response is always OKAY. A burst that runs past the end of a region
// simply continues into the next word index.
// Timing: the write address is taken when no write is in progress, then one
// data beat per clock (WREADY high; the burst ends on the beat AWLEN
// announces), B one clock after the last beat. A read
// address is taken when no read is in progress; the first beat is valid two
// clocks later and each following beat two clocks after the previous one is
// taken (one clock for the registered Readout BRAM read, one for the
// registered data mux).
module hist_axi_regs
  import hist_pkg::*;
#(
  parameter int unsigned H   = 128,
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 16,
  parameter int unsigned T   = 32,
  parameter int unsigned IDW = 4,
  parameter int unsigned BTW = $clog2(T),
  parameter int unsigned IW  = (H > 1) ? $clog2(H) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4 slave: write address
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  logic [IDW-1:0]        s_awid,
  input  logic [17:0]           s_awaddr,
  input  logic [7:0]            s_awlen,
  input  logic [1:0]            s_awburst,
  // write data
  input  logic                  s_wvalid,
  output logic                  s_wready,
  input  logic [31:0]           s_wdata,
  input  logic [3:0]            s_wstrb,
  input  logic                  s_wlast,
  // write response
  output logic                  s_bvalid,
  input  logic                  s_bready,
  output logic [IDW-1:0]        s_bid,
  output logic [1:0]            s_bresp,
  // read address
  input  logic                  s_arvalid,
  output logic                  s_arready,
  input  logic [IDW-1:0]        s_arid,
  input  logic [17:0]           s_araddr,
  input  logic [7:0]            s_arlen,
  input  logic [1:0]            s_arburst,
  // read data
  output logic                  s_rvalid,
  input  logic                  s_rready,
  output logic [IDW-1:0]        s_rid,
  output logic [31:0]           s_rdata,
  output logic [1:0]            s_rresp,
  output logic                  s_rlast,
  // configuration out
  output logic                  enable,
  output logic [M-1:0]          threshold,
  output logic [H-1:0]          flush,
  output logic [H-1:0][T-1:0]   time_offset,
  output logic [H-1:0][BTW-1:0] bit_trunc,
  // status in
  input  logic                  head_valid,
  input  logic [IW-1:0]         head_id,
  input  logic [IW:0]           pending,
  input  logic [H-1:0]          ch_ready,
  input  logic [H-1:0]          ch_holding,
  input  logic [H-1:0]          slot_busy,
  // Readout BRAM read port
  output logic [IW+N-1:0]       ram_raddr,
  input  logic [M-1:0]          ram_rdata
);

  localparam logic [M-1:0] THR_RESET = {{(M-1){1'b1}}, 1'b0};  // 2^M - 2
  localparam logic [1:0]   BURST_FIXED = 2'b00;

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_MUX, R_RESP} rstate_e;

  wstate_e     wstate;
  rstate_e     rstate;
  logic [15:0] wr_idx;
  logic        wr_fixed;
  logic [7:0]  wr_left;      // beats after the current one
  logic        wr_fire;
  logic [15:0] rd_idx;
  logic        rd_fixed;
  logic [7:0]  rd_left;      // beats after the current one
  logic [15:0] rd_next;
  logic [31:0] rd_val;

  function automatic logic [31:0] apply_strb(input logic [31:0] old_v,
                                             input logic [31:0] new_v,
                                             input logic [3:0]  strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  // channel number of a histogram-register word index
  function automatic int unsigned hch(input logic [15:0] idx);
    return int'(idx[13:2]);
  endfunction

  always_comb begin
    s_awready = (wstate == W_IDLE);
    s_wready  = (wstate == W_DATA);
    wr_fire   = s_wvalid && s_wready;
    s_bvalid  = (wstate == W_RESP);
    s_bresp   = 2'b00;
    s_arready = (rstate == R_IDLE);
    s_rvalid  = (rstate == R_RESP);
    s_rresp   = 2'b00;
    s_rlast   = (rd_left == '0);
    rd_next   = rd_fixed ? rd_idx : rd_idx + 16'd1;
    // the Readout BRAM reads the word of the beat that comes next
    if (rstate == R_IDLE) ram_raddr = s_araddr[IW+N+1:2];
    else                  ram_raddr = rd_next[IW+N-1:0];
  end

  // register read mux for rd_idx; the Readout BRAM word for rd_idx arrives
  // in the cycle this is sampled
  always_comb begin
    rd_val = '0;
    unique case (decode_region(rd_idx))
      RG_HEADER: begin
        unique case (rd_idx)
          HDR_MAGIC: rd_val = HIST_MAGIC;
          HDR_H:     rd_val = 32'(H);
          HDR_N:     rd_val = 32'(N);
          HDR_M:     rd_val = 32'(M);
          HDR_T:     rd_val = 32'(T);
          default:   rd_val = '0;
        endcase
      end
      RG_COMMON: begin
        unique case (rd_idx)
          REG_CTRL:   rd_val = 32'(enable);
          REG_THRESH: rd_val = 32'(threshold);
          default:    rd_val = '0;
        endcase
      end
      RG_READOUT: begin
        unique case (rd_idx)
          REG_RO_HEAD:  rd_val = {head_valid, 31'(head_id)};
          REG_RO_COUNT: rd_val = 32'(pending);
          default:      rd_val = '0;
        endcase
      end
      RG_HIST: begin
        if (hch(rd_idx) < H) begin
          unique case (rd_idx[1:0])
            HF_TIME_OFFSET: rd_val = 32'(time_offset[hch(rd_idx)]);
            HF_BIT_TRUNC:   rd_val = 32'(bit_trunc[hch(rd_idx)]);
            HF_STATUS:      rd_val = {29'd0, slot_busy[hch(rd_idx)],
                                      ch_holding[hch(rd_idx)], ch_ready[hch(rd_idx)]};
            default:        rd_val = '0;
          endcase
        end
      end
      RG_RBRAM: begin
        if (int'(rd_idx[14:0]) < H * (2**N)) rd_val = 32'(ram_rdata);
      end
      default: rd_val = '0;
    endcase
  end

  // write side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate      <= W_IDLE;
      wr_idx      <= '0;
      wr_fixed    <= 1'b0;
      wr_left     <= '0;
      s_bid       <= '0;
      enable      <= 1'b0;
      threshold   <= THR_RESET;
      flush       <= '0;
      time_offset <= '0;
      bit_trunc   <= '0;
    end else begin
      flush <= '0;
      unique case (wstate)
        W_IDLE: if (s_awvalid) begin
          wstate   <= W_DATA;
          wr_idx   <= s_awaddr[17:2];
          wr_fixed <= (s_awburst == BURST_FIXED);
          wr_left  <= s_awlen;
          s_bid    <= s_awid;
        end
        W_DATA: if (wr_fire) begin
          if (!wr_fixed) wr_idx <= wr_idx + 16'd1;
          wr_left <= wr_left - 8'd1;
          if (wr_left == '0) wstate <= W_RESP;
        end
        W_RESP: if (s_bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
      if (wr_fire) begin
        unique case (decode_region(wr_idx))
          RG_COMMON: begin
            if (wr_idx == REG_CTRL && s_wstrb[0]) enable <= s_wdata[0];
            if (wr_idx == REG_THRESH)
              threshold <= M'(apply_strb(32'(threshold), s_wdata, s_wstrb));
            if (wr_idx == REG_FLUSH) begin
              if (s_wdata[31])                         flush <= '1;
              else if (32'(s_wdata[30:0]) < H)         flush[s_wdata[IW-1:0]] <= 1'b1;
            end
          end
          RG_HIST: begin
            if (hch(wr_idx) < H) begin
              if (wr_idx[1:0] == HF_TIME_OFFSET)
                time_offset[hch(wr_idx)] <=
                  T'(apply_strb(32'(time_offset[hch(wr_idx)]), s_wdata, s_wstrb));
              if (wr_idx[1:0] == HF_BIT_TRUNC && s_wstrb[0])
                bit_trunc[hch(wr_idx)] <= s_wdata[BTW-1:0];
            end
          end
          default: ;
        endcase
      end
    end
  end

  // read side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate   <= R_IDLE;
      rd_idx   <= '0;
      rd_fixed <= 1'b0;
      rd_left  <= '0;
      s_rid    <= '0;
      s_rdata  <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (s_arvalid) begin
          rstate   <= R_MUX;
          rd_idx   <= s_araddr[17:2];
          rd_fixed <= (s_arburst == BURST_FIXED);
          rd_left  <= s_arlen;
          s_rid    <= s_arid;
        end
        R_MUX: begin
          rstate  <= R_RESP;
          s_rdata <= rd_val;
        end
        R_RESP: if (s_rready) begin
          if (s_rlast) begin
            rstate <= R_IDLE;
          end else begin
            rstate  <= R_MUX;
            rd_idx  <= rd_next;
            rd_left <= rd_left - 8'd1;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // AXI rules: WLAST marks the beat AWLEN announced, and a response stays
  // valid, and its payload stable, until taken
  a_wlast: assert property (@(posedge clk) disable iff (!rst_n)
    wr_fire |-> s_wlast == (wr_left == '0));
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bid));
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata) && $stable(s_rlast));

endmodule
