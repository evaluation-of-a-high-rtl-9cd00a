// stream_ctrl: double-buffered streaming of a data set larger than the SRAM banks.
//
// The input bank A and the output bank B are each split into two segments of SEG_WORDS
// words. While the engine processes input segment s and writes output segment 1-s (segment
// A1 pairs with B0, A0 with B1), the host may load the other input segment and unload the
// other output segment, so transfers overlap computation. Segments are processed
// alternately, starting with A0.
//
// Host side: in_loaded pulses when an input segment (in_loaded_seg) holds in_loaded_count
// atoms; in_free shows which input segments may be (re)loaded. out_ready pulses with
// out_ready_seg and out_ready_count when an output segment is complete; out_unloaded with
// out_unloaded_seg tells the controller the host has copied it out. Engine side: eng_start
// with base addresses and count, eng_done when the block is written. A segment is started
// once its input is loaded and its output segment has been unloaded; otherwise the
// controller waits (wait_load / wait_unload show why). seg_count counts finished segments.
// The segment pairing follows the streaming scheme described for the platform; the handshake
// signals are this design's choice, since the host-side library is not part of the hardware.
module stream_ctrl #(
  parameter int unsigned ADDR_W    = 20,
  parameter int unsigned SEG_WORDS = 1 << 19,
  localparam int unsigned CNT_W    = $clog2(SEG_WORDS + 1)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // host side
  input  logic              in_loaded,
  input  logic              in_loaded_seg,
  input  logic [CNT_W-1:0]  in_loaded_count,
  output logic [1:0]        in_free,
  output logic              out_ready,
  output logic              out_ready_seg,
  output logic [CNT_W-1:0]  out_ready_count,
  input  logic              out_unloaded,
  input  logic              out_unloaded_seg,
  output logic              wait_load,
  output logic              wait_unload,
  output logic [31:0]       seg_count,
  // engine side
  output logic              eng_start,
  output logic [ADDR_W-1:0] eng_in_base,
  output logic [ADDR_W-1:0] eng_out_base,
  output logic [ADDR_W:0]   eng_count,
  input  logic              eng_done
);

  logic [1:0]       in_full, out_full;
  logic [CNT_W-1:0] in_cnt [2];
  logic             cur, running;

  assign in_free     = ~in_full;
  assign wait_load   = enable && !running && !in_full[cur];
  assign wait_unload = enable && !running && in_full[cur] && out_full[~cur];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_full         <= '0;
      out_full        <= '0;
      in_cnt[0]       <= '0;
      in_cnt[1]       <= '0;
      cur             <= 1'b0;
      running         <= 1'b0;
      eng_start       <= 1'b0;
      eng_in_base     <= '0;
      eng_out_base    <= '0;
      eng_count       <= '0;
      out_ready       <= 1'b0;
      out_ready_seg   <= 1'b0;
      out_ready_count <= '0;
      seg_count       <= '0;
    end else begin
      eng_start <= 1'b0;
      out_ready <= 1'b0;

      if (in_loaded) begin
        in_full[in_loaded_seg] <= 1'b1;
        in_cnt[in_loaded_seg]  <= in_loaded_count;
      end
      if (out_unloaded) out_full[out_unloaded_seg] <= 1'b0;

      if (enable && !running && in_full[cur] && !out_full[~cur]) begin
        running      <= 1'b1;
        eng_start    <= 1'b1;
        eng_in_base  <= ADDR_W'(cur ? SEG_WORDS : 0);
        eng_out_base <= ADDR_W'(cur ? 0 : SEG_WORDS);
        eng_count    <= (ADDR_W + 1)'(in_cnt[cur]);
      end

      if (running && eng_done) begin
        running         <= 1'b0;
        in_full[cur]    <= 1'b0;
        out_full[~cur]  <= 1'b1;
        out_ready       <= 1'b1;
        out_ready_seg   <= ~cur;
        out_ready_count <= in_cnt[cur];
        seg_count       <= seg_count + 1;
        cur             <= ~cur;
      end
    end
  end

  // The host may only load a free input segment and unload a full output segment.
  a_load_free: assert property (@(posedge clk) disable iff (!rst_n)
                                in_loaded |-> !in_full[in_loaded_seg])
    else $error("stream_ctrl: input segment loaded while still in use");
  a_unload_full: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_unloaded |-> out_full[out_unloaded_seg])
    else $error("stream_ctrl: output segment unloaded before it was ready");

  initial assert (2 * SEG_WORDS <= (1 << ADDR_W)) else $error("stream_ctrl: two segments must fit a bank");

endmodule
