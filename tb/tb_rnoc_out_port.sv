// tb_rnoc_out_port: self-checking testbench of the output port block.
//
// Four random packet sources stand for the output controllers of lanes 0 to 3
// (0 and 1 primary, 2 and 3 secondary); a random sink stands for the next
// router's input. Every flit carries its source, packet and flit number. The
// checker verifies that packets leave whole, in order per source and never
// interleaved, that a new packet comes from a secondary lane whenever one of
// them is requesting, that only the granted source sees ready, and that the
// block adds no cycle (a lone request with a ready sink passes in the same
// cycle).
module tb_rnoc_out_port;
  import rnoc_pkg::*;

  localparam int NPKT     = 300;
  localparam int MAXLEN   = 10;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [3:0] req_i, gnt_o, ready_o;
  flit_t      flit_i [4];
  logic       valid_o, ready_i;
  flit_t      flit_o;

  rnoc_out_port dut (.clk, .rst, .req_i, .flit_i, .gnt_o, .ready_o, .valid_o, .ready_i, .flit_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  int plen [4][NPKT];

  function automatic flit_t mk(int s, int k, int i);
    flit_t f;
    f.head = (i == 0);
    f.tail = (i == plen[s][k] - 1);
    f.data = {4'(s), 12'(k), 16'(i)};
    return f;
  endfunction

  bit src_en;
  int gk [4], gi [4];
  always @(posedge clk) begin
    if (rst) begin
      req_i <= '0;
      for (int s = 0; s < 4; s++) begin gk[s] = 0; gi[s] = 0; end
    end else if (src_en) begin
      for (int s = 0; s < 4; s++) begin
        if (req_i[s] && ready_o[s]) begin
          gi[s]++;
          if (gi[s] == plen[s][gk[s]]) begin gi[s] = 0; gk[s]++; end
        end
        if (!(req_i[s] && !ready_o[s])) begin
          if (gk[s] < NPKT && ($urandom % 100) < 40) begin
            req_i[s]  <= 1'b1;
            flit_i[s] <= mk(s, gk[s], gi[s]);
          end else req_i[s] <= 1'b0;
        end
      end
    end
  end

  int  exp_k [4], exp_i [4];
  bit  in_pkt;
  int  cur_s, done, n_sec_first;
  always @(posedge clk) begin
    if (rst) begin
      ready_i <= 1'b0;
      in_pkt = 1'b0;
      for (int s = 0; s < 4; s++) begin exp_k[s] = 0; exp_i[s] = 0; end
    end else if (src_en) begin
      checks++;
      if ((ready_o & ~gnt_o) != 0) fail($sformatf("ready %b outside the grant %b", ready_o, gnt_o));
      if (valid_o && ready_i) begin
        int s;
        s = int'(flit_o.data[31:28]);
        checks++;
        if (!in_pkt && |req_i[3:2] && s < 2)
          fail($sformatf("new packet from primary source %0d while secondary requests %b", s, req_i[3:2]));
        if (!in_pkt && s >= 2 && |req_i[1:0]) n_sec_first++;
        if (in_pkt && s != cur_s) fail($sformatf("source %0d interleaved into a packet of source %0d", s, cur_s));
        if (flit_o != mk(s, exp_k[s], exp_i[s]))
          fail($sformatf("source %0d: got %h expected packet %0d flit %0d", s, flit_o, exp_k[s], exp_i[s]));
        in_pkt = !flit_o.tail;
        cur_s  = s;
        exp_i[s]++;
        if (flit_o.tail) begin exp_i[s] = 0; exp_k[s]++; done++; end
      end
      ready_i <= ($urandom % 100) < 70;
    end
  end

  initial begin
    rst = 1'b1; src_en = 1'b0; done = 0; n_sec_first = 0;
    req_i = '0; ready_i = 1'b0;
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < NPKT; k++) plen[s][k] = ($urandom % 2) ? MAXLEN : 1 + int'($urandom % MAXLEN);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Zero-cycle path through an idle port.
    begin
      flit_t f;
      f.head = 1'b1; f.tail = 1'b1; f.data = 32'hBEEF_0002;
      req_i = 4'b0010; flit_i[1] = f; ready_i = 1'b1;
      #1;
      checks++;
      if (!valid_o || flit_o != f || ready_o != 4'b0010) fail("output port is not a zero-cycle path");
      @(posedge clk);
      #1 req_i = '0; ready_i = 1'b0;
    end

    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    src_en = 1'b1;
    wait (done == 4 * NPKT);
    repeat (5) @(posedge clk);
    checks += 2;
    for (int s = 0; s < 4; s++) if (exp_k[s] != NPKT) fail($sformatf("source %0d: packets missing", s));
    if (n_sec_first == 0) fail("secondary priority never exercised against a primary request");
    $display("%0d packets, %0d won by a secondary lane against a primary request", done, n_sec_first);
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
