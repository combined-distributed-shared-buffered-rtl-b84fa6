// tb_rnoc_output_ctrl: self-checking testbench of the output controller.
//
// Two controllers for the North port are tested side by side, one that
// deflects on a busy port (WAIT_IF_BUSY=0, as on primary lanes) and one that
// waits (WAIT_IF_BUSY=1, as on secondary lanes). Each gets its own random
// source of 1- to 10-flit packets, half of them addressed to North, a random
// lane sink, and a random port side that plays the port arbiter: it grants a
// waiting header at random and keeps the grant for the rest of a packet that
// has started. The checker verifies that packets leave whole and in order on
// one side only, that a packet for another port always stays on the lane,
// that a North packet leaves at the port when granted, that the deflecting
// controller deflects it (and pulses deflect_o) when not granted, and that the
// waiting one never lets it go down the lane. It also checks the one-cycle
// latency from the lane input to the port.
module tb_rnoc_output_ctrl;
  import rnoc_pkg::*;

  localparam int NPKT     = 600;
  localparam int MAXLEN   = 10;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [1:0] valid_i, ready_o, lane_valid_o, lane_ready_i, port_req_o, port_gnt_i, port_ready_i, deflect_o;
  flit_t      flit_i [2], lane_flit_o [2], port_flit_o [2];

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N)), .WAIT_IF_BUSY(1'b0)) dut_defl (
    .clk, .rst,
    .valid_i (valid_i[0]), .ready_o (ready_o[0]), .flit_i (flit_i[0]),
    .lane_valid_o (lane_valid_o[0]), .lane_ready_i (lane_ready_i[0]), .lane_flit_o (lane_flit_o[0]),
    .port_req_o (port_req_o[0]), .port_gnt_i (port_gnt_i[0]),
    .port_ready_i (port_ready_i[0]), .port_flit_o (port_flit_o[0]),
    .deflect_o (deflect_o[0]));

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N)), .WAIT_IF_BUSY(1'b1)) dut_wait (
    .clk, .rst,
    .valid_i (valid_i[1]), .ready_o (ready_o[1]), .flit_i (flit_i[1]),
    .lane_valid_o (lane_valid_o[1]), .lane_ready_i (lane_ready_i[1]), .lane_flit_o (lane_flit_o[1]),
    .port_req_o (port_req_o[1]), .port_gnt_i (port_gnt_i[1]),
    .port_ready_i (port_ready_i[1]), .port_flit_o (port_flit_o[1]),
    .deflect_o (deflect_o[1]));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int plen [2][NPKT];
  bit pn   [2][NPKT];

  function automatic flit_t mk(int d, int k, int i);
    flit_t f;
    f.head = (i == 0);
    f.tail = (i == plen[d][k] - 1);
    f.data = {(i == 0 && pn[d][k]) ? 4'(PORT_N) : 4'(PORT_S), 12'(k), 16'(i)};
    return f;
  endfunction

  bit src_en;
  int gk [2], gi [2];
  always @(posedge clk) begin
    if (rst) begin
      valid_i <= '0;
      for (int d = 0; d < 2; d++) begin gk[d] = 0; gi[d] = 0; end
    end else if (src_en) begin
      for (int d = 0; d < 2; d++) begin
        if (valid_i[d] && ready_o[d]) begin
          gi[d]++;
          if (gi[d] == plen[d][gk[d]]) begin gi[d] = 0; gk[d]++; end
        end
        if (!(valid_i[d] && !ready_o[d])) begin
          if (gk[d] < NPKT && ($urandom % 100) < 80) begin
            valid_i[d] <= 1'b1;
            flit_i[d]  <= mk(d, gk[d], gi[d]);
          end else valid_i[d] <= 1'b0;
        end
      end
    end
  end

  // Port-side model of the arbiter and the receiver.
  bit [1:0] arb_lock, gnt_rand, rx_rdy;
  always_comb begin
    for (int d = 0; d < 2; d++) begin
      port_gnt_i[d]   = port_req_o[d] && (arb_lock[d] || gnt_rand[d]);
      port_ready_i[d] = port_gnt_i[d] && rx_rdy[d];
    end
  end

  int  exp_k [2], exp_i [2], done [2], n_defl [2], n_defl_pulse [2], n_port [2];
  bit  side [2];
  always @(posedge clk) begin
    if (rst) begin
      lane_ready_i <= '0; gnt_rand <= '0; rx_rdy <= '0; arb_lock = '0;
      for (int d = 0; d < 2; d++) begin exp_k[d] = 0; exp_i[d] = 0; end
    end else if (src_en) begin
      for (int d = 0; d < 2; d++) begin
        bit lane_x, port_x;
        lane_x = lane_valid_o[d] && lane_ready_i[d];
        port_x = port_req_o[d] && port_ready_i[d];
        if (deflect_o[d]) n_defl_pulse[d]++;
        checks++;
        if (lane_x && port_x) fail("flit sent on both sides");
        if (lane_x || port_x) begin
          flit_t f;
          f = port_x ? port_flit_o[d] : lane_flit_o[d];
          if (f != mk(d, exp_k[d], exp_i[d]))
            fail($sformatf("ctrl %0d: got %h expected packet %0d flit %0d", d, f, exp_k[d], exp_i[d]));
          if (f.head) begin
            side[d] = port_x;
            if (!pn[d][exp_k[d]] && port_x) fail($sformatf("ctrl %0d: packet for another port taken to North", d));
            if (pn[d][exp_k[d]] && lane_x) begin
              if (d == 1) fail("waiting controller let a North packet go down the lane");
              if (port_gnt_i[d]) fail("North packet deflected although granted");
              n_defl[d]++;
            end
            if (port_x) n_port[d]++;
          end else if (side[d] != port_x) fail($sformatf("ctrl %0d: packet %0d changed side", d, exp_k[d]));
          if (port_x) arb_lock[d] = !f.tail;
          exp_i[d]++;
          if (f.tail) begin exp_i[d] = 0; exp_k[d]++; done[d]++; end
        end
      end
      for (int d = 0; d < 2; d++) begin
        lane_ready_i[d] <= ($urandom % 100) < 70;
        gnt_rand[d]     <= ($urandom % 100) < 50;
        rx_rdy[d]       <= ($urandom % 100) < 70;
      end
    end
  end

  initial begin
    rst = 1'b1; src_en = 1'b0;
    valid_i = '0;
    for (int d = 0; d < 2; d++) begin
      done[d] = 0; n_defl[d] = 0; n_defl_pulse[d] = 0; n_port[d] = 0;
      for (int k = 0; k < NPKT; k++) begin
        plen[d][k] = ($urandom % 2) ? MAXLEN : 1 + int'($urandom % MAXLEN);
        pn[d][k]   = ($urandom % 2 == 0);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // One-cycle latency from the lane input to the port request.
    pn[0][0] = 1'b1; plen[0][0] = 1;
    valid_i[0] = 1'b1; flit_i[0] = mk(0, 0, 0);
    @(posedge clk);
    #1 valid_i[0] = 1'b0;
    checks++;
    if (!port_req_o[0] || port_flit_o[0] != mk(0, 0, 0)) fail("one-cycle latency to the port request");
    gnt_rand[0] = 1'b1; rx_rdy[0] = 1'b1;
    @(posedge clk);
    #1 gnt_rand[0] = 1'b0; rx_rdy[0] = 1'b0;

    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    plen[0][0] = MAXLEN;
    src_en = 1'b1;
    wait (done[0] == NPKT && done[1] == NPKT);
    repeat (5) @(posedge clk);
    checks += 3;
    if (n_defl[0] == 0) fail("deflecting controller never deflected");
    if (n_defl_pulse[0] != n_defl[0]) fail($sformatf("deflect_o pulsed %0d times for %0d deflections", n_defl_pulse[0], n_defl[0]));
    if (n_port[1] == 0) fail("waiting controller never used the port");
    $display("deflecting controller: %0d packets, %0d at the port, %0d deflected", done[0], n_port[0], n_defl[0]);
    $display("waiting controller: %0d packets, %0d at the port", done[1], n_port[1]);
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
