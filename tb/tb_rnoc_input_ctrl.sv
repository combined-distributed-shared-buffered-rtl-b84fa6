// tb_rnoc_input_ctrl: self-checking testbench of the input controller.
//
// The controller sits in a router at (2,1). A random source sends packets of
// 1 to 10 flits to random destinations in an 8x8 area and a random sink drains
// the controller. The checker computes the XY output port itself and verifies
// that every header leaves with that port in its output-port field and the
// rest of the header unchanged, that body flits pass unchanged and in order,
// and the one-cycle latency through an idle controller.
module tb_rnoc_input_ctrl;
  import rnoc_pkg::*;

  localparam int NPKT     = 1000;
  localparam int MAXLEN   = 10;
  localparam int WATCHDOG = 200000;
  localparam int MYX = 2, MYY = 1;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  valid_i, ready_o, valid_o, ready_i;
  flit_t flit_i, flit_o;

  rnoc_input_ctrl dut (.clk, .rst, .my_x (COORD_W'(MYX)), .my_y (COORD_W'(MYY)),
                       .valid_i, .ready_o, .flit_i, .valid_o, .ready_i, .flit_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int plen [NPKT], pdx [NPKT], pdy [NPKT];

  // Flit as sent: the output-port field of the header holds garbage (15).
  function automatic flit_t mk(int k, int i);
    flit_t f;
    f.head = (i == 0);
    f.tail = (i == plen[k] - 1);
    if (i == 0) f.data = {4'hF, 4'h0, 8'(k), 8'(pdx[k]), 8'(pdy[k])};
    else        f.data = {4'hA, 12'(k), 16'(i)};
    return f;
  endfunction

  function automatic int ref_port(int dx, int dy);
    if (dx > MYX) return PE;
    if (dx < MYX) return PW;
    if (dy > MYY) return PN;
    if (dy < MYY) return PS;
    return PL;
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
        if (gk < NPKT && ($urandom % 100) < 75) begin
          valid_i <= 1'b1;
          flit_i  <= mk(gk, gi);
        end else valid_i <= 1'b0;
      end
    end
  end

  int exp_k, exp_i, done;
  int n_port [5];
  always @(posedge clk) begin
    if (rst) begin
      ready_i <= 1'b0; exp_k = 0; exp_i = 0;
    end else if (src_en) begin
      if (valid_o && ready_i) begin
        flit_t e;
        e = mk(exp_k, exp_i);
        checks++;
        if (exp_i == 0) begin
          int p;
          p = ref_port(pdx[exp_k], pdy[exp_k]);
          n_port[p]++;
          e.data[31:28] = 4'(p);
        end
        if (flit_o != e) fail($sformatf("packet %0d flit %0d: got %h expected %h", exp_k, exp_i, flit_o, e));
        exp_i++;
        if (flit_o.tail) begin exp_i = 0; exp_k++; done++; end
      end
      ready_i <= ($urandom % 100) < 65;
    end
  end

  initial begin
    rst = 1'b1; src_en = 1'b0; done = 0;
    valid_i = 1'b0; ready_i = 1'b0;
    for (int p = 0; p < 5; p++) n_port[p] = 0;
    for (int k = 0; k < NPKT; k++) begin
      plen[k] = ($urandom % 2) ? MAXLEN : 1 + int'($urandom % MAXLEN);
      pdx[k]  = int'($urandom % 8);
      pdy[k]  = ($urandom % 3 == 0) ? MYY : int'($urandom % 8);
      if ($urandom % 4 == 0) pdx[k] = MYX;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // One-cycle latency.
    plen[0] = 1; pdx[0] = MYX; pdy[0] = 5;
    valid_i = 1'b1; flit_i = mk(0, 0);
    @(posedge clk);
    #1 valid_i = 1'b0;
    checks++;
    if (!valid_o || flit_o.data[31:28] != 4'(PORT_N)) fail("one-cycle latency / North route");
    ready_i = 1'b1;
    @(posedge clk);
    #1 ready_i = 1'b0;

    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    plen[0] = MAXLEN;
    src_en = 1'b1;
    wait (done == NPKT);
    repeat (5) @(posedge clk);
    checks++;
    for (int p = 0; p < 5; p++) if (n_port[p] == 0) fail($sformatf("no packet routed to port %0d", p));
    $display("%0d packets, per port N/E/S/W/L: %0d %0d %0d %0d %0d", done,
             n_port[PN], n_port[PE], n_port[PS], n_port[PW], n_port[PL]);
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
