// tb_rnoc_path_ctrl: self-checking testbench of the path controller.
//
// The controller is built with the forced switch for North enabled (as PATH_N
// of lane 1 is). A random source sends 1- to 10-flit packets, a quarter of
// them with North in the header's output-port field. Two random sinks stand for
// the primary lane and the switch link. The checker verifies that every packet
// leaves whole and in order on exactly one side, that a header only takes the
// switch link when the primary lane did not accept it in that cycle, that
// North packets always take the switch link, and the one-cycle latency
// through an idle controller. It counts the switches and fails if none
// happened for a non-North packet.
module tb_rnoc_path_ctrl;
  import rnoc_pkg::*;

  localparam int NPKT     = 1000;
  localparam int MAXLEN   = 10;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  valid_i, ready_o, pri_valid_o, pri_ready_i, sec_valid_o, sec_ready_i, switch_o;
  flit_t flit_i, pri_flit_o, sec_flit_o;

  rnoc_path_ctrl #(.SEC_ONLY_EN(1'b1), .SEC_ONLY_PORT(4'(PORT_N))) dut (
    .clk, .rst, .valid_i, .ready_o, .flit_i,
    .pri_valid_o, .pri_ready_i, .pri_flit_o,
    .sec_valid_o, .sec_ready_i, .sec_flit_o, .switch_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int plen [NPKT];
  bit pnorth [NPKT];

  function automatic flit_t mk(int k, int i);
    flit_t f;
    f.head = (i == 0);
    f.tail = (i == plen[k] - 1);
    f.data = {(i == 0 && pnorth[k]) ? 4'(PORT_N) : 4'(PORT_W), 12'(k), 16'(i)};
    return f;
  endfunction

  bit src_en;
  int gk, gi;
  always @(posedge clk) begin
    if (rst) begin
      valid_i <= 1'b0; gk = 0; gi = 0;
    end else if (src_en) begin
      if (valid_i && ready_o) begin
        gi++;
        if (gi == plen[gk]) begin gi = 0; gk++; end
      end
      if (!(valid_i && !ready_o)) begin
        if (gk < NPKT && ($urandom % 100) < 80) begin
          valid_i <= 1'b1;
          flit_i  <= mk(gk, gi);
        end else valid_i <= 1'b0;
      end
    end
  end

  // Sinks and checker. Packets leave in source order: the controller holds a
  // packet until it has gone, so the next one cannot overtake it.
  int  exp_k, exp_i, done, n_switch;
  bit  side;  // side of the packet in progress: 0 primary, 1 switch link
  always @(posedge clk) begin
    if (rst) begin
      pri_ready_i <= 1'b0; sec_ready_i <= 1'b0;
      exp_k = 0; exp_i = 0;
    end else if (src_en) begin
      checks++;
      if ((pri_valid_o && pri_ready_i) && (sec_valid_o && sec_ready_i)) fail("flit sent on both sides");
      if ((pri_valid_o && pri_ready_i) || (sec_valid_o && sec_ready_i)) begin
        flit_t f;
        bit    s;
        s = sec_valid_o && sec_ready_i;
        f = s ? sec_flit_o : pri_flit_o;
        if (f != mk(exp_k, exp_i)) fail($sformatf("got %h expected packet %0d flit %0d", f, exp_k, exp_i));
        if (f.head) begin
          side = s;
          if (s && pri_ready_i && !pnorth[exp_k]) fail("switched although the primary lane was ready");
          if (!s && pnorth[exp_k]) fail("North packet stayed on the primary lane");
          if (s && !pnorth[exp_k]) n_switch++;
        end else if (s != side) fail($sformatf("packet %0d changed side", exp_k));
        exp_i++;
        if (f.tail) begin exp_i = 0; exp_k++; done++; end
      end
      pri_ready_i <= ($urandom % 100) < 60;
      sec_ready_i <= ($urandom % 100) < 60;
    end
  end

  initial begin
    rst = 1'b1; src_en = 1'b0; done = 0; n_switch = 0;
    valid_i = 1'b0; pri_ready_i = 1'b0; sec_ready_i = 1'b0;
    for (int k = 0; k < NPKT; k++) begin
      plen[k]   = ($urandom % 2) ? MAXLEN : 1 + int'($urandom % MAXLEN);
      pnorth[k] = ($urandom % 4 == 0);
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // One-cycle latency to the primary lane.
    pnorth[0] = 1'b0; plen[0] = 1;
    valid_i = 1'b1; flit_i = mk(0, 0); pri_ready_i = 1'b1;
    @(posedge clk);
    #1 valid_i = 1'b0;
    checks++;
    if (!pri_valid_o || pri_flit_o != mk(0, 0)) fail("one-cycle latency to the primary lane");
    @(posedge clk);
    #1 pri_ready_i = 1'b0;

    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    plen[0] = MAXLEN;
    src_en = 1'b1;
    wait (done == NPKT);
    repeat (5) @(posedge clk);
    checks++;
    if (n_switch == 0) fail("no packet switched to the secondary lane");
    $display("%0d packets, %0d switched because the primary lane was blocked", done, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d packets", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
