// tb_rnoc_eb: self-checking testbench of the elastic buffer.
//
// A random source (valid with 70 % probability, data changed only after a
// transfer) feeds the buffer and a random sink (ready with 60 % probability)
// drains it. A reference queue checks that every accepted word comes out once,
// in order, and that nothing is invented. Directed parts check the one-cycle
// latency through an empty buffer, the full rate of one word per cycle when
// the sink is always ready, and that with the sink stalled the buffer takes
// exactly two words (main and ghost register) before it drops ready_o.
module tb_rnoc_eb;
  import rnoc_pkg::*;

  localparam int NWORDS   = 5000;
  localparam int WATCHDOG = 100000;

  logic  clk = 1'b0;
  logic  rst;
  always #5 clk = ~clk;

  logic  valid_i, ready_o, valid_o, ready_i;
  flit_t data_i, data_o;

  rnoc_eb #(.T(flit_t)) dut (.clk, .rst, .valid_i, .ready_o, .data_i, .valid_o, .ready_i, .data_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  flit_t q[$];
  int    sent, got;
  int    src_pct, snk_pct;
  bit    src_en;

  function automatic flit_t rand_flit();
    flit_t f;
    f.head = 1'($urandom);
    f.tail = 1'($urandom);
    f.data = $urandom;
    return f;
  endfunction

  // Random source and sink (while src_en), with a reference queue.
  always @(posedge clk) begin
    if (!rst && src_en) begin
      if (valid_i && ready_o) begin
        q.push_back(data_i);
        sent++;
      end
      if (valid_o && ready_i) begin
        checks++;
        got++;
        if (q.size() == 0) fail("output word with nothing sent");
        else begin
          flit_t e;
          e = q.pop_front();
          if (data_o != e) fail($sformatf("word %0d: got %h expected %h", got, data_o, e));
        end
      end
      if (!(valid_i && !ready_o)) begin
        if (sent + int'(valid_i && ready_o) < NWORDS && int'($urandom % 100) < src_pct) begin
          valid_i <= 1'b1;
          data_i  <= rand_flit();
        end else begin
          valid_i <= 1'b0;
        end
      end
      ready_i <= (int'($urandom % 100) < snk_pct);
    end
  end

  initial begin
    rst = 1'b1;
    src_en = 1'b0;
    sent = 0; got = 0;
    src_pct = 100; snk_pct = 100;
    valid_i = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // Latency: a word taken at edge t is visible at valid_o right after t.
    @(negedge clk);
    valid_i = 1'b1; data_i = rand_flit(); ready_i = 1'b0;
    @(posedge clk);   // transfer in
    #1;
    checks++;
    if (!valid_o || data_o != data_i) fail("one-cycle latency through an empty buffer");
    // Stall: one more word fits (ghost), then ready_o drops.
    data_i = rand_flit();
    checks++;
    if (!ready_o) fail("ready_o low with only the main register full");
    @(posedge clk);
    #1;
    checks++;
    if (ready_o) fail("ready_o high with main and ghost registers full");
    valid_i = 1'b0;
    // Drain the two words.
    ready_i = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++;
    if (valid_o) fail("buffer not empty after draining two words");
    q.delete();

    // Full rate: with the sink always ready, 100 words take 100 cycles.
    begin
      int t0, n;
      n = 0;
      @(negedge clk);
      valid_i = 1'b1; ready_i = 1'b1;
      t0 = cycle;
      while (n < 100) begin
        data_i = rand_flit();
        @(posedge clk); #1;
        if (ready_o) n++;
      end
      valid_i = 1'b0;
      checks++;
      if (cycle - t0 != 100) fail($sformatf("100 words took %0d cycles", cycle - t0));
      @(posedge clk); #1;
    end

    // Random traffic checked against the reference queue.
    rst = 1'b1;
    @(posedge clk);
    q.delete();
    sent = 0; got = 0;
    #1 rst = 1'b0;
    src_pct = 70; snk_pct = 60;
    valid_i = 1'b0; ready_i = 1'b0;
    src_en = 1'b1;
    wait (got == NWORDS);
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) fail("words left over");
    $display("random traffic: %0d words", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
