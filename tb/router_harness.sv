// router_harness: stimulus and scoreboard for one cdma_router instance.
//
// Drives the router's input ports and checks its output ports. Everything
// happens on the falling clock edge: outputs are sampled there (they show the
// state after the preceding rising edge) and new inputs are applied for the
// next rising edge. A packet counts as accepted when in_valid and in_ready are
// both high on a falling edge; it is then queued in the reference model under
// its (source port, destination port) pair. Every delivered packet must be the
// oldest queued one for its pair, at its addressed port; packets to address 0
// must vanish. Phases:
//   1. one packet into an idle router: checks the 3-clock latency and the
//      idle ports' silence;
//   2. permutation traffic, every port sending to a different destination in
//      every clock: checks one delivered packet per port per clock;
//   3. random traffic with contention, full buffers, loopback and address-0
//      packets, then draining, checking that nothing is lost.
// It counts how often each mechanism happened and reports a failure for any
// that never did. `req`/`gnt` are the router's internal scheduler signals.
module router_harness #(
  parameter int unsigned ADDR_W    = 3,
  parameter int unsigned PAYLOAD_W = 16,
  parameter int unsigned RANDOM_CYCLES = 3000,
  localparam int unsigned NP       = (1 << ADDR_W) - 1,
  localparam int unsigned PKT_W    = 2 * ADDR_W + PAYLOAD_W
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic [NP-1:0]            in_valid,
  input  logic [NP-1:0]            in_ready,
  output logic [NP-1:0][PKT_W-1:0] in_pkt,
  input  logic [NP-1:0]            out_valid,
  input  logic [NP-1:0][PKT_W-1:0] out_pkt,
  input  logic [NP-1:0]            req,
  input  logic [NP-1:0]            gnt,
  output logic                     done,
  output int                       checks,
  output int                       failures
);
  typedef logic [PKT_W-1:0] pkt_t;
  pkt_t q [NP][NP][$];

  int cycle;
  int delivered, accepted, dropped_sent;
  int n_contention, n_backpressure, n_all_ports, n_idle_ports, n_loopback;
  int lat_accept_cycle, lat_seen_cycle;
  int tput_window_count;
  bit tput_window;

  function automatic pkt_t make_pkt(int src, int dst);
    pkt_t p;
    logic [PAYLOAD_W-1:0] pay;
    for (int b = 0; b < PAYLOAD_W; b += 32) begin
      logic [31:0] r;
      r = $urandom;
      for (int k = 0; k < 32 && b + k < PAYLOAD_W; k++) pay[b + k] = r[k];
    end
    p = {ADDR_W'(src), ADDR_W'(dst), pay};
    return p;
  endfunction

  function automatic int dst_of(pkt_t p);
    return int'(p[PAYLOAD_W +: ADDR_W]);
  endfunction

  function automatic int src_of(pkt_t p);
    return int'(p[PAYLOAD_W + ADDR_W +: ADDR_W]);
  endfunction

  function automatic int popc(logic [NP-1:0] v);
    int n = 0;
    for (int i = 0; i < NP; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int pending();
    int n = 0;
    for (int s = 0; s < NP; s++)
      for (int d = 0; d < NP; d++) n += q[s][d].size();
    return n;
  endfunction

  // Sample outputs and record accepted inputs at every falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int j = 0; j < NP; j++) begin
        if (out_valid[j]) begin
          int s;
          s = src_of(out_pkt[j]) - 1;
          checks++;
          delivered++;
          if (tput_window) tput_window_count++;
          lat_seen_cycle = cycle;
          if (dst_of(out_pkt[j]) != j + 1 || s < 0 || s >= NP) begin
            failures++;
            $display("port %0d got misaddressed packet %h", j, out_pkt[j]);
          end else if (q[s][j].size() == 0) begin
            failures++;
            $display("port %0d got unexpected packet %h", j, out_pkt[j]);
          end else begin
            pkt_t e;
            e = q[s][j].pop_front();
            if (e !== out_pkt[j]) begin
              failures++;
              $display("port %0d: got %h expected %h", j, out_pkt[j], e);
            end
          end
        end
      end
      if ((req & ~gnt) != '0) n_contention++;
      if (popc(gnt) == NP) n_all_ports++;
      if (popc(gnt) > 0 && popc(gnt) < NP) n_idle_ports++;
    end
  end

  task automatic wait_negedges(int n);
    repeat (n) @(negedge clk);
  endtask

  // Called once the inputs for the next rising edge are applied: in_ready only
  // changes at rising edges, so in_valid & in_ready now is what that edge takes.
  // Then waits until just after the next falling edge, where new inputs go.
  logic [NP-1:0] taken;
  task automatic step();
    taken = in_valid & in_ready;
    if ((in_valid & ~in_ready) != '0) n_backpressure++;
    for (int i = 0; i < NP; i++) begin
      if (taken[i]) begin
        int d;
        d = dst_of(in_pkt[i]);
        accepted++;
        lat_accept_cycle = cycle + 1;
        if (d == 0) dropped_sent++;
        else begin
          q[i][d-1].push_back(in_pkt[i]);
          if (d == i + 1) n_loopback++;
        end
      end
    end
    @(negedge clk);
    #1;
  endtask

  task automatic expect_cond(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int shift, t0, d0;
    done = 0; checks = 0; failures = 0; cycle = 0;
    delivered = 0; accepted = 0; dropped_sent = 0;
    n_contention = 0; n_backpressure = 0; n_all_ports = 0; n_idle_ports = 0; n_loopback = 0;
    tput_window = 0; tput_window_count = 0; taken = '0;
    in_valid = '0; in_pkt = '0;
    rst_n = 0;
    wait_negedges(3);
    rst_n = 1;
    step();

    // Phase 1: a single packet, port 2 -> address 5.
    in_valid[1] = 1'b1;
    in_pkt[1]   = make_pkt(2, 5);
    step();
    in_valid = '0;
    wait_negedges(8);
    expect_cond(delivered == 1, "single packet delivered once");
    expect_cond(lat_seen_cycle - lat_accept_cycle == 3,
                $sformatf("latency %0d clocks, expected 3", lat_seen_cycle - lat_accept_cycle));
    step();

    // Phase 2: permutation traffic, every port to a distinct destination.
    shift = 1 + ($urandom % (NP - 1));
    in_valid = '1;
    for (int k = 0; k < 40 + 10; k++) begin
      for (int i = 0; i < NP; i++) in_pkt[i] = make_pkt(i + 1, ((i + shift) % NP) + 1);
      if (k == 10) tput_window = 1;
      if (k == 40 + 10 - 1) tput_window = 0;
      step();
    end
    tput_window = 0;
    in_valid = '0;
    wait_negedges(10);
    expect_cond(tput_window_count >= 40 * NP - NP,
                $sformatf("throughput: %0d packets in 40 clocks, expected %0d", tput_window_count, 40 * NP));
    step();

    // Phase 3: random traffic.
    for (int k = 0; k < RANDOM_CYCLES; k++) begin
      for (int i = 0; i < NP; i++) begin
        // hold a packet that was not taken, as a valid/ready source must
        if (!(in_valid[i] && !taken[i])) begin
          int r;
          r = $urandom % 100;
          in_valid[i] = (r < 70);
          if (r < 2)       d0 = 0;                 // address 0: dropped
          else if (r < 8)  d0 = i + 1;             // loopback
          else if (r < 45) d0 = 1 + (k / 50) % NP; // hot spot: contention
          else             d0 = 1 + ($urandom % NP);
          in_pkt[i] = make_pkt(i + 1, d0);
        end
      end
      step();
    end
    in_valid = '0;
    t0 = 0;
    while (pending() != 0 && t0 < 2000) begin
      step();
      t0++;
    end
    wait_negedges(6);
    expect_cond(pending() == 0, $sformatf("%0d packets never delivered", pending()));
    expect_cond(accepted == delivered + dropped_sent,
                $sformatf("accepted %0d, delivered %0d, dropped %0d", accepted, delivered, dropped_sent));

    $display("mechanisms: contention=%0d backpressure=%0d all_ports=%0d partial_ports=%0d loopback=%0d dst0_dropped=%0d",
             n_contention, n_backpressure, n_all_ports, n_idle_ports, n_loopback, dropped_sent);
    expect_cond(n_contention > 0,   "contention never happened");
    expect_cond(n_backpressure > 0, "buffer never filled");
    expect_cond(n_all_ports > 0,    "all ports never sent together");
    expect_cond(n_idle_ports > 0,   "no cycle with idle and active ports");
    expect_cond(n_loopback > 0,     "no loopback packet");
    expect_cond(dropped_sent > 0,   "no address-0 packet");
    done = 1;
  end

endmodule
