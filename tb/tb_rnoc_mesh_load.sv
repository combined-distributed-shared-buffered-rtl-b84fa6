// tb_rnoc_mesh_load: load sweep of the 4x4 R-NoC mesh at its default size.
//
// This testbench runs the kind of measurement behind a latency versus offered
// load curve. Every node has a traffic source on its local input and an
// always-ready sink on its local output. For each measuring point the network
// starts empty, every source sends a fixed number of packets, and each source
// offers a given share of a flit per cycle (the offered load, in flits per
// node per cycle). The points are:
//   - uniform random and transpose traffic with 10-flit packets, at offered
//     loads of 5, 10, 20, 30 and 40 percent;
//   - uniform random traffic with 4-, 8-, 12- and 16-flit packets at 20
//     percent.
// A source creates packets at random times at the offered rate and queues
// them; the queue sends them back to back. For every point the testbench
// prints the average packet latency (cycles from the creation of a packet to
// its tail leaving the destination router, so it includes the wait in the
// source queue) and the accepted throughput over the whole run, draining
// included (under transpose the four nodes on the diagonal send nothing).
// The checker works as in the end-to-end test: every packet must arrive once,
// at the right node, in order and not interleaved.
// On top of that, every packet's latency must be at least the zero-load
// bound of its path (one cycle per router for the input controller plus the
// output controllers passed, taken as 4 cycles per hop as a floor, plus one
// cycle per body flit), and the average latency of each sweep must not fall
// from its lowest to its highest load. The latency numbers themselves are
// this design's; they are not compared with the document's curves, which
// include other router configurations.
module tb_rnoc_mesh_load;
  import rnoc_pkg::*;

  localparam int MX = 4, MY = 4, NODES = MX * MY;
  localparam int NPKT = 24;       // packets per node in each measuring point
  localparam int WATCHDOG = 600000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [NODES-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t            in_flit  [NODES];
  flit_t            out_flit [NODES];
  rnoc_events_t     events   [NODES];

  rnoc_mesh dut (
    .clk, .rst,
    .local_in_valid  (in_valid),
    .local_in_ready  (in_ready),
    .local_in_flit   (in_flit),
    .local_out_valid (out_valid),
    .local_out_ready (out_ready),
    .local_out_flit  (out_flit),
    .events
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // ------------------------------------------------------------ packets
  int pkt_dst [NODES][NPKT];
  int pkt_t0  [NODES][NPKT];
  bit pkt_got [NODES][NPKT];
  int plen;
  bit gen_en;
  int inj_pct;

  function automatic flit_t mk_flit(int s, int k, int i);
    flit_t f;
    if (i == 0) begin
      f = make_head(8'(pkt_dst[s][k] % MX), 8'(pkt_dst[s][k] / MX),
                    {4'(s), 8'(k)}, plen == 1);
    end else begin
      f.head = 1'b0;
      f.tail = (i == plen - 1);
      f.data = {4'hD, 4'(s), 8'(k), 4'(i), 12'h7E7};
    end
    return f;
  endfunction

  // ------------------------------------------------------------ sources
  // Each cycle a node creates a new packet with probability load / plen, so
  // that it offers `load` percent of a flit per cycle. Created packets wait in
  // the source queue and are sent back to back.
  int gen_c [NODES], gen_k [NODES], gen_i [NODES];

  always @(posedge clk) begin
    if (rst) begin
      in_valid <= '0;
      for (int s = 0; s < NODES; s++) begin gen_c[s] = 0; gen_k[s] = 0; gen_i[s] = 0; end
    end else begin
      for (int s = 0; s < NODES; s++) begin
        if (gen_en && gen_c[s] < NPKT && (int'($urandom % (100 * plen)) < inj_pct)) begin
          pkt_t0[s][gen_c[s]] = cycle;
          gen_c[s]++;
        end
        while (gen_c[s] < NPKT && pkt_dst[s][gen_c[s]] < 0) gen_c[s]++;   // no packet
        if (in_valid[s] && in_ready[s]) begin
          gen_i[s]++;
          if (gen_i[s] == plen) begin gen_i[s] = 0; gen_k[s]++; end
        end
        while (gen_k[s] < gen_c[s] && pkt_dst[s][gen_k[s]] < 0) gen_k[s]++;
        if (in_valid[s] && !in_ready[s]) begin
          // hold the flit
        end else if (gen_k[s] < gen_c[s]) begin
          in_valid[s] <= 1'b1;
          in_flit[s]  <= mk_flit(s, gen_k[s], gen_i[s]);
        end else begin
          in_valid[s] <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ sinks
  bit busy [NODES];
  int cur_s [NODES], cur_k [NODES], cur_i [NODES];
  int received, expected;
  longint lat_sum;
  int flits_out, t_first, t_last;

  assign out_ready = '1;

  always @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < NODES; d++) busy[d] = 1'b0;
    end else begin
      for (int d = 0; d < NODES; d++) begin
        if (out_valid[d] && out_ready[d]) begin
          flit_t f;
          bit done;
          f = out_flit[d];
          done = 1'b0;
          checks++;
          flits_out++;
          t_last = cycle;
          if (f.head) begin
            int s, k;
            s = int'(f.data[27:24]);
            k = int'(f.data[23:16]);
            if (busy[d]) fail($sformatf("node %0d: head inside a packet", d));
            if (k >= NPKT) begin
              fail($sformatf("node %0d: bad tag %0d/%0d", d, s, k));
            end else begin
              if (pkt_dst[s][k] != d) fail($sformatf("packet %0d/%0d arrived at node %0d", s, k, d));
              if (pkt_got[s][k]) fail($sformatf("packet %0d/%0d arrived twice", s, k));
              pkt_got[s][k] = 1'b1;
              cur_s[d] = s; cur_k[d] = k; cur_i[d] = 1;
              busy[d] = !f.tail;
              done = f.tail;
            end
          end else if (!busy[d]) begin
            fail($sformatf("node %0d: body flit without head", d));
          end else begin
            if (f != mk_flit(cur_s[d], cur_k[d], cur_i[d]))
              fail($sformatf("node %0d: flit %0d of packet %0d/%0d wrong", d, cur_i[d], cur_s[d], cur_k[d]));
            cur_i[d]++;
            if (f.tail) begin busy[d] = 1'b0; done = 1'b1; end
          end
          if (done) begin
            int s, k, hops, lat;
            s = cur_s[d]; k = cur_k[d];
            hops = iabs(s % MX - d % MX) + iabs(s / MX - d / MX);
            lat = cycle - pkt_t0[s][k];
            lat_sum += longint'(lat);
            received++;
            checks++;
            if (lat < 4 * hops + plen - 1)
              fail($sformatf("packet %0d/%0d latency %0d below the bound of %0d hops", s, k, lat, hops));
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ points
  // Runs one measuring point and returns its average latency in cycles.
  task automatic run_point(input int pattern, input int len, input int load, output real avg);
    rst <= 1'b1;
    gen_en = 1'b0;
    repeat (2) @(posedge clk);
    plen = len;
    inj_pct = load;
    expected = 0;
    received = 0;
    lat_sum = 0;
    flits_out = 0;
    for (int s = 0; s < NODES; s++) begin
      for (int k = 0; k < NPKT; k++) begin
        int d;
        if (pattern == 0) begin
          d = int'($urandom % NODES);
          while (d == s) d = int'($urandom % NODES);
        end else begin
          d = (s % MX) * MX + (s / MX);                  // transpose
        end
        if (d == s) d = -1;                              // a node does not send to itself
        pkt_dst[s][k] = d;
        pkt_got[s][k] = 1'b0;
        if (d >= 0) expected++;
      end
    end
    @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    t_first = cycle;
    gen_en = 1'b1;
    wait (received == expected);
    repeat (10) @(posedge clk);
    checks++;
    for (int s = 0; s < NODES; s++)
      for (int k = 0; k < NPKT; k++)
        if (pkt_dst[s][k] >= 0 && !pkt_got[s][k]) fail($sformatf("packet %0d/%0d lost", s, k));
    avg = real'(lat_sum) / real'(received);
    $display("%-9s len %2d  offered %2d%%  avg latency %7.2f  accepted %5.1f%%",
             pattern == 0 ? "uniform" : "transpose", len, load, avg,
             100.0 * real'(flits_out) / real'((t_last - t_first + 1) * NODES));
  endtask

  int loads [5] = '{5, 10, 20, 30, 40};
  int lens  [4] = '{4, 8, 12, 16};
  real avg, first_avg;

  initial begin
    rst = 1'b1;
    gen_en = 1'b0;
    plen = 10;
    inj_pct = 0;
    for (int p = 0; p < 2; p++) begin
      for (int l = 0; l < 5; l++) begin
        run_point(p, 10, loads[l], avg);
        if (l == 0) first_avg = avg;
      end
      checks++;
      if (avg < first_avg)
        fail($sformatf("pattern %0d: latency falls from %0.2f to %0.2f with load", p, first_avg, avg));
    end
    for (int l = 0; l < 4; l++) begin
      run_point(0, lens[l], 20, avg);
      if (l == 0) first_avg = avg;
    end
    checks++;
    if (avg < first_avg)
      fail($sformatf("packet length: latency falls from %0.2f to %0.2f", first_avg, avg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d of %0d packets delivered", received, expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
