// tb_junction_station: one junction station (horizontal ring 0, 8 PEs per
// horizontal ring, so addresses 0-7 live on this ring and 8-15 elsewhere)
// with a driver and a monitor on each of its two rings. The two ring clocks
// have the same 56 ps period and different phases.
//
// Every slot is accounted for from the logs, per side:
//   - a slot the side must not take (horizontal: address 0-7; vertical:
//     address 8-15) leaves exactly one cycle later, data one cycle after;
//   - a slot it may take either leaves unchanged one cycle later (refused,
//     FIFO full) or is taken; taken slots must appear, in order and with
//     their address, as adds on the other ring;
//   - any other slot leaving a side must be the next word taken by the other
//     side, placed in a slot that was free or taken.
// Phases: single packets on idle rings (the ring-change latency is measured
// in receiving-ring cycles), random traffic on both rings, and a vertical
// ring fully busy with through traffic while the horizontal ring offers
// packets for other rings, which fills the H->V FIFO and forces refusals.
`timescale 1ps/1ps
module tb_junction_station;
  localparam int unsigned K = 4, D = 144, DEPTH = 8, PES_PER_H = 8;
  localparam int NC = 5000;
  localparam int RPER = 56;

  logic hclk = 0, vclk = 0, hrst = 1, vrst = 1;
  logic h_in_valid = 0, v_in_valid = 0, h_out_valid, v_out_valid;
  logic [K-1:0] h_in_addr = '0, v_in_addr = '0, h_out_addr, v_out_addr;
  logic [D-1:0] h_in_data = '0, v_in_data = '0, h_out_data, v_out_data;

  junction_station #(.K(K), .D(D), .DEPTH(DEPTH), .PES_PER_H(PES_PER_H), .MY_H(0)) dut (.*);

  initial begin #7;  forever #(RPER / 2) hclk = ~hclk; end
  initial begin #20; forever #(RPER / 2) vclk = ~vclk; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #(RPER * (NC + 1000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] rnd();
    logic [D-1:0] w;
    for (int b = 0; b < int'(D); b += 32) w[b +: 32] = $urandom;
    return w;
  endfunction

  // Per-side logs; side 0 = horizontal, 1 = vertical.
  bit           iv [2][NC];
  logic [K-1:0] ia [2][NC];
  logic [D-1:0] id [2][NC];
  bit           ov [2][NC];
  logic [K-1:0] oa [2][NC];
  logic [D-1:0] od [2][NC];
  int  cyc [2] = '{0, 0};
  int  mode [2] = '{0, 0};   // 0 idle, 1 random, 2 all "take", 3 all "pass"
  int  single [2] = '{-1, -1};
  logic [D-1:0] pend [2];

  // "take" address for a side: other ring (H) or this ring (V).
  function automatic logic [K-1:0] take_addr(input int side);
    return side == 0 ? K'(8 + $urandom % 8) : K'($urandom % 8);
  endfunction
  function automatic logic [K-1:0] pass_addr(input int side);
    return side == 0 ? K'($urandom % 8) : K'(8 + $urandom % 8);
  endfunction
  function automatic bit takes(input int side, input logic [K-1:0] a);
    return side == 0 ? (a >= 8) : (a < 8);
  endfunction

  task automatic drive(input int side, output logic v, output logic [K-1:0] a);
    case (mode[side])
      1: begin v = 1'($urandom); a = K'($urandom); end
      2: begin v = 1; a = take_addr(side); end
      3: begin v = 1; a = pass_addr(side); end
      default: begin v = 0; a = '0; end
    endcase
    if (single[side] >= 0) begin v = 1; a = K'(single[side]); single[side] = -1; end
  endtask

  always @(negedge hclk) if (!hrst && cyc[0] < NC - 2) begin
    logic v; logic [K-1:0] a;
    drive(0, v, a);
    h_in_data <= pend[0]; h_in_valid <= v; h_in_addr <= a;
    iv[0][cyc[0]] = v; ia[0][cyc[0]] = a; id[0][cyc[0]] = rnd(); pend[0] = id[0][cyc[0]];
  end
  always @(negedge vclk) if (!vrst && cyc[1] < NC - 2) begin
    logic v; logic [K-1:0] a;
    drive(1, v, a);
    v_in_data <= pend[1]; v_in_valid <= v; v_in_addr <= a;
    iv[1][cyc[1]] = v; ia[1][cyc[1]] = a; id[1][cyc[1]] = rnd(); pend[1] = id[1][cyc[1]];
  end
  always @(posedge hclk) if (!hrst) begin
    ov[0][cyc[0]] = h_out_valid; oa[0][cyc[0]] = h_out_addr;
    if (cyc[0] > 0) od[0][cyc[0] - 1] = h_out_data;
    cyc[0]++;
  end
  always @(posedge vclk) if (!vrst) begin
    ov[1][cyc[1]] = v_out_valid; oa[1][cyc[1]] = v_out_addr;
    if (cyc[1] > 0) od[1][cyc[1] - 1] = v_out_data;
    cyc[1]++;
  end

  initial begin
    logic [K+D-1:0] taken [2][$];
    int tk_time [2][$];
    int n_pass [2], n_take [2], n_ref [2], n_add [2], ti [2];
    int lat_min [2];
    int ph3_start;
    for (int s = 0; s < 2; s++) begin
      n_pass[s] = 0; n_take[s] = 0; n_ref[s] = 0; n_add[s] = 0; ti[s] = 0; lat_min[s] = 1000;
      pend[s] = '0;
    end
    repeat (4) @(negedge hclk);
    hrst = 0; vrst = 0;
    repeat (10) @(negedge hclk);
    // single packets each way on idle rings
    single[0] = 11; repeat (40) @(negedge hclk);
    single[1] = 3;  repeat (40) @(negedge vclk);
    single[0] = 0;  repeat (40) @(negedge hclk);
    // random traffic
    mode[0] = 1; mode[1] = 1;
    repeat (1500) @(negedge hclk);
    // vertical ring full of through traffic, horizontal offers packets for it
    mode[1] = 3; mode[0] = 2; ph3_start = cyc[0];
    repeat (200) @(negedge hclk);
    mode[1] = 0;
    repeat (100) @(negedge hclk);
    mode[0] = 0;
    repeat (300) @(negedge hclk);

    // ---- account for every slot ----
    for (int s = 0; s < 2; s++) begin
      for (int c = 1; c < cyc[s] - 3; c++) begin
        if (iv[s][c-1] && !takes(s, ia[s][c-1])) begin
          check(ov[s][c] && oa[s][c] == ia[s][c-1] && od[s][c] == id[s][c-1],
                $sformatf("side %0d slot %0d not passed on in one cycle", s, c - 1));
          n_pass[s]++;
        end else if (iv[s][c-1] && ov[s][c] && oa[s][c] == ia[s][c-1] && od[s][c] == id[s][c-1]) begin
          n_ref[s]++;
        end else if (iv[s][c-1]) begin
          taken[s].push_back({ia[s][c-1], id[s][c-1]});
          tk_time[s].push_back(c);
          n_take[s]++;
        end
      end
    end
    for (int s = 0; s < 2; s++) begin
      int o;
      o = 1 - s;   // adds on side s come from what side o took
      for (int c = 1; c < cyc[s] - 3; c++) begin
        bit busy;
        busy = iv[s][c-1] && (!takes(s, ia[s][c-1])
               || (ov[s][c] && oa[s][c] == ia[s][c-1] && od[s][c] == id[s][c-1]));
        if (ov[s][c] && !busy) begin
          check(ti[s] < taken[o].size() && {oa[s][c], od[s][c]} == taken[o][ti[s]],
                $sformatf("side %0d cycle %0d: add is not the next word taken on the other ring", s, c));
          if (ti[s] < taken[o].size() && c - tk_time[o][ti[s]] < lat_min[s])
            lat_min[s] = c - tk_time[o][ti[s]];
          ti[s]++; n_add[s]++;
        end
      end
      check(ti[s] == taken[o].size(), $sformatf("side %0d: %0d taken on the other ring, %0d added", s, taken[o].size(), ti[s]));
    end
    $display("H: pass=%0d take=%0d refused=%0d add=%0d; V: pass=%0d take=%0d refused=%0d add=%0d",
             n_pass[0], n_take[0], n_ref[0], n_add[0], n_pass[1], n_take[1], n_ref[1], n_add[1]);
    $display("fastest ring change: H->V %0d cycles, V->H %0d cycles (address in, address out)",
             lat_min[1], lat_min[0]);
    // Taken in the data cycle c, out as an add in cycle c + lat: the pointer
    // crossing (write, 2 synchronizer stages, empty flag) costs a few cycles.
    check(lat_min[0] <= 7 && lat_min[1] <= 7, "ring change too slow");
    for (int s = 0; s < 2; s++)
      check(n_pass[s] > 100 && n_take[s] > 50 && n_add[s] > 50, $sformatf("side %0d: every operation happened", s));
    check(n_ref[0] > 0, "H->V FIFO never refused a packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
