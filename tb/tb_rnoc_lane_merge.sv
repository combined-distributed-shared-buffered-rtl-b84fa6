// tb_rnoc_lane_merge: self-checking testbench of the lane merge (join point).
//
// Two random packet sources (stream a: the lane, stream b: an input port) feed
// the merge and a random sink drains it. Packets are 1 to 10 flits; every flit
// carries its stream, packet and flit number. The checker verifies that the
// output never interleaves two packets, that each stream's flits come out
// complete and in order, and that the merge adds no cycle: with an idle merge
// and a ready sink, a flit offered at an input is at the output in the same
// cycle.
module tb_rnoc_lane_merge;
  import rnoc_pkg::*;

  localparam int NPKT     = 400;
  localparam int MAXLEN   = 10;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  a_valid_i, a_ready_o, b_valid_i, b_ready_o, valid_o, ready_i;
  flit_t a_flit_i, b_flit_i, flit_o;

  rnoc_lane_merge dut (.clk, .rst, .a_valid_i, .a_ready_o, .a_flit_i,
                       .b_valid_i, .b_ready_o, .b_flit_i, .valid_o, .ready_i, .flit_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int plen [2][NPKT];

  function automatic flit_t mk(int s, int k, int i);
    flit_t f;
    f.head = (i == 0);
    f.tail = (i == plen[s][k] - 1);
    f.data = {4'(s), 12'(k), 16'(i)};
    return f;
  endfunction

  // Sources.
  bit src_en;
  int gk [2], gi [2];
  logic [1:0] v, r;
  flit_t      fl [2];
  assign a_valid_i = v[0]; assign a_flit_i = fl[0]; assign r[0] = a_ready_o;
  assign b_valid_i = v[1]; assign b_flit_i = fl[1]; assign r[1] = b_ready_o;

  always @(posedge clk) begin
    if (rst) begin
      v <= '0;
      for (int s = 0; s < 2; s++) begin gk[s] = 0; gi[s] = 0; end
    end else if (src_en) begin
      for (int s = 0; s < 2; s++) begin
        if (v[s] && r[s]) begin
          gi[s]++;
          if (gi[s] == plen[s][gk[s]]) begin gi[s] = 0; gk[s]++; end
        end
        if (!(v[s] && !r[s])) begin
          if (gk[s] < NPKT && ($urandom % 100) < 60) begin
            v[s]  <= 1'b1;
            fl[s] <= mk(s, gk[s], gi[s]);
          end else v[s] <= 1'b0;
        end
      end
    end
  end

  // Sink and checker.
  int  exp_k [2], exp_i [2];
  bit  in_pkt;
  int  cur_s, done;
  always @(posedge clk) begin
    if (rst) begin
      ready_i <= 1'b0;
      in_pkt = 1'b0;
      for (int s = 0; s < 2; s++) begin exp_k[s] = 0; exp_i[s] = 0; end
    end else if (src_en) begin
      if (valid_o && ready_i) begin
        int s;
        s = int'(flit_o.data[31:28]);
        checks++;
        if (s > 1) fail("unknown stream");
        else begin
          if (in_pkt && s != cur_s) fail($sformatf("stream %0d interleaved into a packet of stream %0d", s, cur_s));
          if (flit_o != mk(s, exp_k[s], exp_i[s]))
            fail($sformatf("stream %0d: got %h expected packet %0d flit %0d", s, flit_o, exp_k[s], exp_i[s]));
          in_pkt = !flit_o.tail;
          cur_s  = s;
          exp_i[s]++;
          if (flit_o.tail) begin exp_i[s] = 0; exp_k[s]++; done++; end
        end
      end
      ready_i <= ($urandom % 100) < 70;
    end
  end

  initial begin
    rst = 1'b1; src_en = 1'b0; done = 0;
    v = '0; ready_i = 1'b0;
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < NPKT; k++) plen[s][k] = ($urandom % 2) ? MAXLEN : 1 + int'($urandom % MAXLEN);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Zero-cycle merge: a flit offered on b with the sink ready is at the output now.
    begin
      flit_t f;
      f.head = 1'b1; f.tail = 1'b1; f.data = 32'hFEED_0001;
      v[1] = 1'b1; fl[1] = f; ready_i = 1'b1;
      #1;
      checks++;
      if (!valid_o || flit_o != f || !b_ready_o) fail("merge is not a zero-cycle path");
      @(posedge clk);
      #1 v[1] = 1'b0; ready_i = 1'b0;
    end

    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    src_en = 1'b1;
    wait (done == 2 * NPKT);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_k[0] != NPKT || exp_k[1] != NPKT) fail("packets missing");
    $display("merged %0d packets", done);
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
