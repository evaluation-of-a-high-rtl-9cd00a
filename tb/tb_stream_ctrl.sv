// tb_stream_ctrl: self-checking test of the double-buffered streaming controller.
//
// Segments are 16 words. A stand-in engine answers eng_start with eng_done count+3 cycles
// later. The host side loads input segments and unloads output segments with varying delays
// so that the controller must wait both for a load and for an unload. Checked: the engine is
// started in order on A0->B1, A1->B0, A0->B1, ... with the right base addresses and counts,
// out_ready reports the right segment and count, the free flags track loads and
// completions, both wait conditions occur, and the finished-segment count is right.
module tb_stream_ctrl;
  localparam int unsigned AW = 6;
  localparam int unsigned SEG = 16;
  localparam int unsigned CW = $clog2(SEG + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, in_loaded, in_loaded_seg, out_ready, out_ready_seg, out_unloaded, out_unloaded_seg;
  logic [CW-1:0] in_loaded_count, out_ready_count;
  logic [1:0] in_free;
  logic wait_load, wait_unload, eng_start, eng_done;
  logic [31:0] seg_count;
  logic [AW-1:0] eng_in_base, eng_out_base;
  logic [AW:0] eng_count;

  stream_ctrl #(.ADDR_W(AW), .SEG_WORDS(SEG)) dut (.*);

  int checks = 0, failures = 0;
  int n_wait_load = 0, n_wait_unload = 0, n_started = 0, n_ready = 0;
  int counts [6] = '{16, 9, 16, 1, 12, 16};

  // stand-in engine
  int eng_timer = -1;
  always @(posedge clk) begin
    eng_done <= 1'b0;
    if (eng_start) eng_timer <= int'(eng_count) + 3;
    else if (eng_timer > 0) eng_timer <= eng_timer - 1;
    else if (eng_timer == 0) begin
      eng_done <= 1'b1;
      eng_timer <= -1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (wait_load) n_wait_load++;
    if (wait_unload) n_wait_unload++;
    if (eng_start) begin
      checks++;
      if (eng_in_base != AW'((n_started % 2) * SEG) || eng_out_base != AW'(((n_started + 1) % 2) * SEG)
          || eng_count != (AW + 1)'(counts[n_started])) begin
        failures++;
        $display("FAIL start %0d: in %0d out %0d count %0d", n_started, eng_in_base, eng_out_base, eng_count);
      end
      n_started++;
    end
    if (out_ready) begin
      checks++;
      if (out_ready_seg != 1'((n_ready + 1) % 2) || out_ready_count != CW'(counts[n_ready])) begin
        failures++;
        $display("FAIL ready %0d: seg %0d count %0d", n_ready, out_ready_seg, out_ready_count);
      end
      n_ready++;
    end
  end

  task automatic load(int seg, int idx);
    while (!in_free[seg]) @(negedge clk);
    in_loaded = 1; in_loaded_seg = 1'(seg); in_loaded_count = CW'(counts[idx]);
    @(negedge clk);
    in_loaded = 0;
    checks++;
    if (in_free[seg]) begin
      failures++;
      $display("FAIL: segment %0d still free after load", seg);
    end
  endtask

  task automatic unload(int seg);
    while (n_ready == 0 || !(dut.out_full[seg])) @(negedge clk);
    out_unloaded = 1; out_unloaded_seg = 1'(seg);
    @(negedge clk);
    out_unloaded = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; in_loaded = 0; in_loaded_seg = 0; in_loaded_count = '0;
    out_unloaded = 0; out_unloaded_seg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    repeat (5) @(negedge clk);          // nothing loaded yet: waits for a load
    load(0, 0);
    load(1, 1);
    load(0, 2);                          // A0 again once the first segment is consumed
    repeat (40) @(negedge clk);          // B1 not unloaded yet: waits for an unload
    unload(1);
    unload(0);
    load(1, 3);
    unload(1);
    load(0, 4);
    unload(0);
    load(1, 5);
    unload(1);
    unload(0);
    repeat (5) @(negedge clk);
    checks++;
    if (n_started != 6 || n_ready != 6 || seg_count != 6 || n_wait_load == 0 || n_wait_unload == 0) begin
      failures++;
      $display("FAIL: started %0d ready %0d seg_count %0d wait_load %0d wait_unload %0d",
               n_started, n_ready, seg_count, n_wait_load, n_wait_unload);
    end
    $display("segments %0d, cycles waiting for load %0d, for unload %0d", n_started, n_wait_load, n_wait_unload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
