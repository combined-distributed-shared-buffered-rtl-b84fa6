// tb_rnoc_port_arb: self-checking testbench of the static-priority port arbiter.
//
// Inputs 0 and 1 are the primary-lane output controllers, 2 and 3 the
// secondary-lane ones. Directed checks: a lone request is granted in the same
// cycle; with primary and secondary requests together the secondary group
// wins; a packet that has started keeps the port until its tail, even against
// a secondary request. A random run then checks every cycle that the grant is
// one-hot or zero, that an idle port goes to the secondary group whenever that
// group requests, that a started packet keeps its input, and that no request
// waits for ever.
module tb_rnoc_port_arb;

  localparam int NCYC     = 20000;
  localparam int WATCHDOG = 100000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [3:0] req_i, gnt_o;
  logic       xfer_i, xfer_tail_i;

  rnoc_port_arb dut (.clk, .rst, .req_i, .gnt_o, .xfer_i, .xfer_tail_i);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  task automatic expect_gnt(input logic [3:0] e, input string what);
    #1;
    checks++;
    if (gnt_o !== e) fail($sformatf("%s: gnt %b expected %b", what, gnt_o, e));
  endtask

  // Random-run monitor.
  bit         mon_on;
  bit         pk_locked;
  logic [3:0] pk_owner;
  int         wait_cnt [4];
  int         max_wait;
  always @(posedge clk) begin
    if (rst) begin
      pk_locked = 1'b0;
      for (int i = 0; i < 4; i++) wait_cnt[i] = 0;
    end else if (mon_on) begin
      checks++;
      if (!$onehot0(gnt_o)) fail($sformatf("grant %b not one-hot", gnt_o));
      if (pk_locked && gnt_o != pk_owner) fail($sformatf("packet of %b lost the port to %b", pk_owner, gnt_o));
      if (!pk_locked && |req_i[3:2] && !(|gnt_o[3:2])) fail($sformatf("req %b: secondary request not preferred, gnt %b", req_i, gnt_o));
      if (!pk_locked && |req_i && !(|(gnt_o & req_i))) fail($sformatf("req %b: idle port not granted", req_i));
      if (xfer_i) begin
        pk_locked = !xfer_tail_i;
        pk_owner  = gnt_o;
      end
      for (int i = 0; i < 4; i++) begin
        wait_cnt[i] = (req_i[i] && !(xfer_i && gnt_o[i])) ? wait_cnt[i] + 1 : 0;
        if (wait_cnt[i] > max_wait) max_wait = wait_cnt[i];
      end
    end
  end

  logic [3:0] hold;  // inputs that must keep requesting (packet in flight)
  initial begin
    rst = 1'b1; req_i = '0; xfer_i = 1'b0; xfer_tail_i = 1'b0; mon_on = 1'b0; max_wait = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    req_i = 4'b0001; expect_gnt(4'b0001, "lone primary request");
    req_i = 4'b1000; expect_gnt(4'b1000, "lone secondary request");
    req_i = 4'b0101; expect_gnt(4'b0100, "secondary beats primary");
    req_i = 4'b0000; @(posedge clk);

    // Lock: primary input 1 starts a 2-flit packet, then a secondary requests.
    #1 req_i = 4'b0010;
    #1 xfer_i = 1'b1; xfer_tail_i = 1'b0;
    @(posedge clk);
    #1 req_i = 4'b1010; xfer_i = 1'b0;
    expect_gnt(4'b0010, "started primary packet keeps the port");
    xfer_i = 1'b1; xfer_tail_i = 1'b1;
    @(posedge clk);
    #1 xfer_i = 1'b0; xfer_tail_i = 1'b0; req_i = 4'b1000;
    expect_gnt(4'b1000, "secondary granted after the tail");
    req_i = '0;
    @(posedge clk);

    // Random run: an input with a granted head keeps requesting until its tail.
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    mon_on = 1'b1;
    hold = '0;
    repeat (NCYC) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) req_i[i] = hold[i] | (($urandom % 100) < 30);
      #1;
      xfer_i      = |(gnt_o & req_i) && ($urandom % 3 != 0);
      xfer_tail_i = ($urandom % 4 == 0);
      if (xfer_i) hold = xfer_tail_i ? (hold & ~gnt_o) : (hold | gnt_o);
    end
    @(negedge clk);
    req_i = '0; xfer_i = 1'b0;
    checks++;
    if (max_wait > 200) fail($sformatf("a request waited %0d cycles", max_wait));
    $display("random run: longest wait %0d cycles", max_wait);
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
