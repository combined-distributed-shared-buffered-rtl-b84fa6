// tb_rnoc_router: self-checking testbench of one 4-lane R-NoC router.
//
// The router sits at mesh position (1,1). Phase 1 sends a single-flit packet
// from the West input to the North output into an idle router and checks the
// six-cycle zero-load path (the longest path of lane 0). Phase 2 drives all
// five inputs with random wormhole packets of 1 to 10 flits whose destinations
// obey XY routing (North and South inputs only go on in y or to Local, no
// U-turns), while the five outputs accept flits with random back-pressure.
// The checker, which computes the expected output port from the destination on
// its own, verifies for every flit that it leaves at the right port, that the
// flits of a packet arrive in order and are not interleaved with another
// packet on the same output, that each tail closes its packet, and at the end
// that every packet arrived. It also counts the router's mechanisms
// (deflection on a busy port, switch onto a secondary lane, exit from a
// secondary lane, input back-pressure) and fails if one never happened.
module tb_rnoc_router;
  import rnoc_pkg::*;

  localparam int NPKT    = 300;   // packets per input in phase 2
  localparam int MAXLEN  = 10;    // packet length used in the document's study
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [4:0]   in_valid, in_ready, out_valid, out_ready;
  flit_t        in_flit  [5];
  flit_t        out_flit [5];
  rnoc_events_t events;

  rnoc_router dut (
    .clk, .rst,
    .my_x (8'd1), .my_y (8'd1),
    .in_valid, .in_ready, .in_flit,
    .out_valid, .out_ready, .out_flit,
    .events
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ------------------------------------------------------------ packets
  int         pkt_dst [5][NPKT];   // expected output port
  int         pkt_len [5][NPKT];
  logic [7:0] pkt_dx  [5][NPKT];
  logic [7:0] pkt_dy  [5][NPKT];
  bit         pkt_got [5][NPKT];
  int         npkt_phase;          // packets per input in the current phase
  bit         gen_en;
  int         inj_pct, rdy_pct;

  // Legal XY destinations for each input port of a router at (1,1).
  function automatic int pick_dst(int src);
    int r;
    r = int'($urandom % 4);
    case (src)
      PN: return (r < 2) ? PS : PL;
      PS: return (r < 2) ? PN : PL;
      PE: return (r == 0) ? PW : (r == 1) ? PS : (r == 2) ? PL : PN;
      PW: return (r == 0) ? PE : (r == 1) ? PS : (r == 2) ? PL : PN;
      default: return (r == 0) ? PE : (r == 1) ? PS : (r == 2) ? PW : PN;
    endcase
  endfunction

  task automatic set_coords(int s, int k);
    case (pkt_dst[s][k])
      PE:      begin pkt_dx[s][k] = 8'(2 + $urandom % 3); pkt_dy[s][k] = 8'($urandom % 4); end
      PW:      begin pkt_dx[s][k] = 8'd0;                 pkt_dy[s][k] = 8'($urandom % 4); end
      PN:      begin pkt_dx[s][k] = 8'd1;                 pkt_dy[s][k] = 8'(2 + $urandom % 3); end
      PS:      begin pkt_dx[s][k] = 8'd1;                 pkt_dy[s][k] = 8'd0; end
      default: begin pkt_dx[s][k] = 8'd1;                 pkt_dy[s][k] = 8'd1; end
    endcase
  endtask

  // Independent reference for the XY routing decision of router (1,1).
  function automatic int ref_port(logic [7:0] dx, logic [7:0] dy);
    if (dx > 1) return PE;
    if (dx < 1) return PW;
    if (dy > 1) return PN;
    if (dy < 1) return PS;
    return PL;
  endfunction

  function automatic flit_t mk_flit(int s, int k, int i);
    flit_t f;
    if (i == 0) begin
      f = make_head(pkt_dx[s][k], pkt_dy[s][k], {3'(s), 9'(k)}, pkt_len[s][k] == 1);
    end else begin
      f.head = 1'b0;
      f.tail = (i == pkt_len[s][k] - 1);
      f.data = {4'hB, 3'(s), 9'(k), 4'(i), 12'h5A5};
    end
    return f;
  endfunction

  // ------------------------------------------------------------ generators
  int gen_k [5], gen_i [5];
  int last_in_cycle [5];
  logic [4:0] gen_mask;

  always @(posedge clk) begin
    if (rst) begin
      in_valid <= '0;
      for (int s = 0; s < 5; s++) begin gen_k[s] = 0; gen_i[s] = 0; end
    end else begin
      for (int s = 0; s < 5; s++) begin
        if (in_valid[s] && in_ready[s]) begin
          last_in_cycle[s] = cycle;
          gen_i[s]++;
          if (gen_i[s] == pkt_len[s][gen_k[s]]) begin gen_i[s] = 0; gen_k[s]++; end
        end
        if (in_valid[s] && !in_ready[s]) begin
          // hold the flit
        end else if (gen_en && gen_mask[s] && gen_k[s] < npkt_phase && (int'($urandom % 100) < inj_pct)) begin
          in_valid[s] <= 1'b1;
          in_flit[s]  <= mk_flit(s, gen_k[s], gen_i[s]);
        end else begin
          in_valid[s] <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ sinks / checker
  bit out_busy [5];
  int out_s [5], out_k [5], out_i [5];
  int received;
  int n_deflect, n_lane_sw, n_sec_exit, n_stall;
  int last_out_cycle [5];

  always @(posedge clk) begin
    if (rst) begin
      out_ready <= '0;
      for (int p = 0; p < 5; p++) out_busy[p] = 1'b0;
    end else begin
      if (events.deflect)  n_deflect++;
      if (events.lane_sw)  n_lane_sw++;
      if (events.sec_exit) n_sec_exit++;
      if (events.in_stall) n_stall++;
      for (int p = 0; p < 5; p++) begin
        if (out_valid[p] && out_ready[p]) begin
          flit_t f;
          f = out_flit[p];
          last_out_cycle[p] = cycle;
          checks++;
          if (f.head) begin
            int s, k;
            s = int'(f.data[27:25]);
            k = int'(f.data[24:16]);
            if (out_busy[p]) fail($sformatf("port %0d: head inside a packet", p));
            if (s > 4 || k >= npkt_phase) begin
              fail($sformatf("port %0d: bad tag %0d/%0d", p, s, k));
            end else begin
              if (ref_port(pkt_dx[s][k], pkt_dy[s][k]) != p)
                fail($sformatf("packet %0d/%0d left at port %0d", s, k, p));
              if (pkt_got[s][k]) fail($sformatf("packet %0d/%0d delivered twice", s, k));
              pkt_got[s][k] = 1'b1;
              if (f.data[31:28] != 4'(p))
                fail($sformatf("packet %0d/%0d header port field %0d", s, k, f.data[31:28]));
              out_s[p] = s; out_k[p] = k; out_i[p] = 1;
              out_busy[p] = !f.tail;
              if (f.tail != (pkt_len[s][k] == 1)) fail("single-flit tail mismatch");
              if (f.tail) received++;
            end
          end else begin
            if (!out_busy[p]) begin
              fail($sformatf("port %0d: body flit without head", p));
            end else begin
              if (f != mk_flit(out_s[p], out_k[p], out_i[p]))
                fail($sformatf("port %0d: flit %0d of packet %0d/%0d wrong", p, out_i[p], out_s[p], out_k[p]));
              out_i[p]++;
              if (f.tail) begin
                out_busy[p] = 1'b0;
                received++;
              end
            end
          end
        end
        out_ready[p] <= (int'($urandom % 100) < rdy_pct);
      end
    end
  end

  // ------------------------------------------------------------ sequence
  int t_in;
  initial begin
    rst = 1'b1;
    gen_en = 1'b0;
    inj_pct = 0; rdy_pct = 100;
    npkt_phase = 0;
    received = 0;
    n_deflect = 0; n_lane_sw = 0; n_sec_exit = 0; n_stall = 0;
    for (int s = 0; s < 5; s++) begin
      for (int k = 0; k < NPKT; k++) begin
        pkt_dst[s][k] = pick_dst(s);
        pkt_len[s][k] = 1 + int'($urandom % MAXLEN);
        if ($urandom % 2 == 0) pkt_len[s][k] = MAXLEN;
        set_coords(s, k);
        pkt_got[s][k] = 1'b0;
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // Phase 1: zero-load latency, West -> North, one flit.
    pkt_dst[PW][0] = PN; pkt_len[PW][0] = 1; pkt_dx[PW][0] = 8'd1; pkt_dy[PW][0] = 8'd3;
    npkt_phase = 1;
    gen_mask = 5'b1 << PW;
    inj_pct = 100;
    gen_en = 1'b1;
    wait (received == 1);
    gen_en = 1'b0;
    t_in = last_in_cycle[PW];
    checks++;
    if (last_out_cycle[PN] - t_in != 6)
      fail($sformatf("zero-load W->N latency %0d cycles, expected 6", last_out_cycle[PN] - t_in));
    else
      $display("zero-load W->N latency: 6 cycles");
    repeat (5) @(posedge clk);

    // Phase 2: random traffic on all inputs.
    rst <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < 5; s++) pkt_got[s][0] = 1'b0;
    pkt_dst[PW][0] = pick_dst(PW); pkt_len[PW][0] = MAXLEN; set_coords(PW, 0);
    received = 0;
    @(posedge clk);
    rst <= 1'b0;
    npkt_phase = NPKT;
    inj_pct = 70; rdy_pct = 55;
    gen_mask = '1;
    gen_en = 1'b1;
    wait (received == 5 * NPKT);
    repeat (20) @(posedge clk);
    checks++;
    for (int s = 0; s < 5; s++)
      for (int k = 0; k < NPKT; k++)
        if (!pkt_got[s][k]) fail($sformatf("packet %0d/%0d never arrived", s, k));
    $display("mechanisms: deflect=%0d lane_switch=%0d secondary_exit=%0d input_stall=%0d",
             n_deflect, n_lane_sw, n_sec_exit, n_stall);
    checks += 4;
    if (n_deflect == 0)  fail("no deflection on a busy output");
    if (n_lane_sw == 0)  fail("no switch onto a secondary lane");
    if (n_sec_exit == 0) fail("no exit from a secondary lane");
    if (n_stall == 0)    fail("no input back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, received %0d packets", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
