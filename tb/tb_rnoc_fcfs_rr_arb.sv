// tb_rnoc_fcfs_rr_arb: self-checking testbench of the two-input FCFS/RR arbiter.
//
// Directed checks: a lone request is granted in the same cycle (Mealy output);
// a request that arrives while the other input is already requesting waits
// (first come, first served) and is granted as soon as the first one drops;
// requests that arrive together are served alternately (round-robin); a
// packet keeps the grant from its head to its tail even while the other input
// requests. Then random requests with random packet transfers run against an
// independent reference model of the same policy, compared every cycle.
module tb_rnoc_fcfs_rr_arb;

  localparam int NCYC     = 20000;
  localparam int WATCHDOG = 100000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [1:0] req_i, gnt_o;
  logic       xfer_i, xfer_tail_i;

  rnoc_fcfs_rr_arb dut (.clk, .rst, .req_i, .gnt_o, .xfer_i, .xfer_tail_i);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  task automatic expect_gnt(input logic [1:0] e, input string what);
    #1;
    checks++;
    if (gnt_o !== e) fail($sformatf("%s: gnt %b expected %b", what, gnt_o, e));
  endtask

  // Reference model: a request that was alone in the previous cycle beats a
  // newcomer; with both requesting, the grant stays where it was while no flit
  // moves, and after a flit (or on a simultaneous arrival) it goes to the
  // input not served last; a started packet keeps its input until its tail.
  bit  m_last, m_locked, m_owner, m_moved;
  logic [1:0] m_prev_req, m_prev_gnt, m_gnt;
  always_comb begin
    if (m_locked)                          m_gnt = m_owner ? 2'b10 : 2'b01;
    else if (req_i == 2'b11) begin
      if (m_prev_req == 2'b01)             m_gnt = 2'b01;
      else if (m_prev_req == 2'b10)        m_gnt = 2'b10;
      else if (m_prev_req == 2'b11 && !m_moved && m_prev_gnt != 2'b00) m_gnt = m_prev_gnt;
      else                                 m_gnt = m_last ? 2'b01 : 2'b10;
    end else                               m_gnt = req_i;
  end

  bit model_on;
  always @(posedge clk) begin
    if (rst) begin
      m_last = 1'b1; m_locked = 1'b0; m_owner = 1'b0; m_moved = 1'b0;
      m_prev_req = '0; m_prev_gnt = '0;
    end else begin
      if (model_on) begin
        checks++;
        if (gnt_o !== m_gnt) fail($sformatf("req %b: gnt %b, model %b", req_i, gnt_o, m_gnt));
      end
      m_prev_gnt = (req_i == 2'b11) ? m_gnt : 2'b00;
      m_prev_req = req_i;
      m_moved    = xfer_i;
      if (xfer_i) begin
        m_last = m_gnt[1];
        if (xfer_tail_i) m_locked = 1'b0;
        else begin m_locked = 1'b1; m_owner = m_gnt[1]; end
      end
    end
  end

  initial begin
    rst = 1'b1; req_i = '0; xfer_i = 1'b0; xfer_tail_i = 1'b0; model_on = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Mealy: lone requests granted in the same cycle.
    req_i = 2'b01; expect_gnt(2'b01, "lone request 0");
    req_i = 2'b10; expect_gnt(2'b10, "lone request 1");
    req_i = 2'b00; @(posedge clk);

    // FCFS: input 1 first, input 0 one cycle later.
    #1 req_i = 2'b10; @(posedge clk);
    #1 req_i = 2'b11; expect_gnt(2'b10, "first come (1) keeps the grant");
    @(posedge clk);
    expect_gnt(2'b10, "first come (1) still granted");
    req_i = 2'b01; expect_gnt(2'b01, "late request 0 granted once 1 drops");
    @(posedge clk);
    #1 req_i = 2'b00; @(posedge clk);

    // RR: simultaneous requests, each served with a single-flit packet.
    begin
      logic [1:0] first;
      #1 req_i = 2'b11;
      #1 first = gnt_o;
      xfer_i = 1'b1; xfer_tail_i = 1'b1;
      @(posedge clk);
      #1 xfer_i = 1'b0; req_i = 2'b00;
      @(posedge clk);
      #1 req_i = 2'b11;
      expect_gnt(~first, "round-robin on simultaneous requests");
      req_i = 2'b00;
      @(posedge clk);
    end

    // Packet lock: head of a 3-flit packet through input 0, input 1 requests.
    #1 req_i = 2'b01;
    #1 xfer_i = 1'b1; xfer_tail_i = 1'b0;
    @(posedge clk);
    #1 req_i = 2'b10; xfer_i = 1'b0;
    expect_gnt(2'b01, "packet lock holds input 0");
    req_i = 2'b11; xfer_i = 1'b1;
    @(posedge clk);
    #1 xfer_tail_i = 1'b1;
    expect_gnt(2'b01, "packet lock holds input 0 until the tail");
    @(posedge clk);
    #1 xfer_i = 1'b0; xfer_tail_i = 1'b0;
    expect_gnt(2'b10, "input 1 granted after the tail");
    req_i = 2'b00;
    @(posedge clk);

    // Random run against the reference model.
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    model_on = 1'b1;
    repeat (NCYC) begin
      @(negedge clk);
      // A requester keeps its request while it holds a packet.
      req_i[0] = (m_locked && !m_owner) ? 1'b1 : 1'($urandom % 3 != 0);
      req_i[1] = (m_locked &&  m_owner) ? 1'b1 : 1'($urandom % 3 != 0);
      #1;
      xfer_i      = |(gnt_o & req_i) && ($urandom % 2 == 0);
      xfer_tail_i = ($urandom % 4 == 0);
    end
    @(negedge clk);
    req_i = '0; xfer_i = 1'b0;
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
