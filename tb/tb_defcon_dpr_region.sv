// tb_defcon_dpr_region -- self-checking test of the two-engine fail-safe
// wrapper at its default sizes (128-bit round registers, 32-bit read-out).
//
// The two encryption engines are replaced by a stand-in in this testbench: a
// keyed 10-round mixing function that updates a 128-bit round register once
// per clock, run twice in lock step. It is not AES; the monitor only sees
// whether the two copies agree. Each operation is: start (clears the alarm
// registers and loads the registers), 10 rounds, then four 32-bit reads
// issued to both read-out MUXes.
//
// Scenarios and expected results:
//   fault-free             no alarm, read1b = read1ub = read2 = ciphertext
//   engine 2 diverges      alarms 1/2 registered and still up at the end
//                          (code F), DEFCON2 also alarms, read1b all 0
//   transient difference   one round differs only: alarms 1/2 registered
//                          one clock later, unregistered back to 0 (code 3),
//                          read1b blocked
//   read address fault     engine 2 reads the wrong chunk from read 2 on:
//                          reads 0 and 1 pass, later reads blocked (partial)
//   monitor upset          a flipped table bit in a DEFCON1 rxor gives a false
//                          alarm with correct ciphertexts; with correct_sw
//                          the next operation runs clean
`timescale 1ns/1ps
module tb_defcon_dpr_region;
  import defcon_pkg::*;

  localparam int DW = 128, BW = 32;
  localparam int NL = 183 + 47 + 34;
  localparam int L  = NL * CFG_W;
  localparam logic [127:0] MIX = 128'h9E3779B97F4A7C15_F39CC0605CEDC834;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, flip = 1'b0;
  logic head, tail;
  logic [DW-1:0] state1 = '0, state2 = '0;
  logic start = 1'b0, rd_start1 = 1'b0, rd_start2 = 1'b0, csw = 1'b0;
  logic [1:0] rd_addr1 = '0, rd_addr2 = '0;
  logic [BW-1:0] read1b, read1ub, read2;
  logic [3:0] alarm_r, alarm_ur;
  int checks = 0, failures = 0;

  assign head = tail ^ flip;

  defcon_dpr_region dut (
    .clk, .rst_n, .cfg_en, .ccff_head(head), .ccff_tail(tail),
    .state1, .state2, .start, .rd_start1, .rd_addr1, .rd_start2, .rd_addr2,
    .correct_sw(csw), .read1b, .read1ub, .read2, .alarm_r, .alarm_ur);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rotate(input int f);
    for (int c = 0; c < L; c++) begin
      @(negedge clk);
      cfg_en = 1'b1;
      flip   = (c == f);
    end
    @(negedge clk);
    cfg_en = 1'b0;
    flip   = 1'b0;
  endtask

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic [127:0] k, input int r);
    return {s[94:0], s[127:95]} ^ (s >> 7) ^ k ^ (MIX * 128'(r + 1));
  endfunction

  // run one operation. fault_kind: 0 none, 1 engine 2 diverges from round
  // fr on, 2 engine 2 differs only in round fr, 3 engine 2 reads chunk
  // addr+1 from read 2 on. Returns the three read-outs and the alarms seen
  // after the rounds (before reading) and at the end.
  task automatic run_op(input logic [127:0] pt, input logic [127:0] key, input int fault_kind,
                        input int fr, output logic [127:0] ct_ref, output logic [127:0] r1b,
                        output logic [127:0] r1ub, output logic [127:0] r2,
                        output logic [3:0] al_r_rounds, output logic [3:0] al_ur_rounds,
                        output logic [3:0] al_r_end);
    logic [127:0] s1, s2;
    @(negedge clk);
    // start also refreshes both read registers so that stale read-outs of a
    // previous operation do not count against this one
    start     = 1'b1;
    rd_addr1  = '0;
    rd_addr2  = '0;
    rd_start1 = 1'b1;
    rd_start2 = 1'b1;
    s1     = pt ^ key;
    s2     = s1;
    state1 = s1;
    state2 = s2;
    @(negedge clk);
    start     = 1'b0;
    rd_start1 = 1'b0;
    rd_start2 = 1'b0;
    for (int r = 0; r < 10; r++) begin
      s1 = round_fn(s1, key, r);
      s2 = round_fn(s2, key, r);
      if (fault_kind == 1 && r == fr) s2[17] = !s2[17];
      state1 = s1;
      state2 = s2;
      if (fault_kind == 2 && r == fr) state2[64] = !state2[64];
      #1;
      if (fault_kind == 2 && r == fr) begin
        chk(alarm_ur[1:0] == 2'b11, "mismatch seen in the same cycle");
        chk(alarm_r[1:0] == 2'b00, "registered alarm not before the clock");
      end
      @(negedge clk);
      if (fault_kind == 2 && r == fr)
        chk(alarm_r[1:0] == 2'b11, "registered alarm one clock after the mismatch");
    end
    ct_ref = s1;
    al_r_rounds  = alarm_r;
    al_ur_rounds = alarm_ur;
    for (int a = 0; a < 4; a++) begin
      rd_addr1  = 2'(a);
      rd_addr2  = (fault_kind == 3 && a >= 2) ? 2'(a + 1) : 2'(a);
      rd_start1 = 1'b1;
      rd_start2 = 1'b1;
      @(negedge clk);
      rd_start1 = 1'b0;
      rd_start2 = 1'b0;
      @(negedge clk);
      r1b[32*a +: 32]  = read1b;
      r1ub[32*a +: 32] = read1ub;
      r2[32*a +: 32]   = read2;
    end
    al_r_end = alarm_r;
  endtask

  initial begin
    logic [127:0] pt, key, ct, r1b, r1ub, r2;
    logic [3:0] arr, aur, are;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      pt  = {$urandom(), $urandom(), $urandom(), $urandom()};
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      run_op(pt, key, 0, 0, ct, r1b, r1ub, r2, arr, aur, are);
      chk(are == 4'b0000 && aur == 4'b0000, $sformatf("fault-free alarms %b", are));
      chk(r1b == ct && r1ub == ct && r2 == ct, "fault-free read-out");
    end
    // engine 2 diverges from round 3
    run_op(pt, key, 1, 3, ct, r1b, r1ub, r2, arr, aur, are);
    chk(arr[1:0] == 2'b11 && aur[1:0] == 2'b11, $sformatf("divergence code F: r=%b ur=%b", arr, aur));
    chk(are == 4'b1111, $sformatf("divergence all registered alarms %b", are));
    chk(r1ub == ct && r2 != ct, "engine 1 correct, engine 2 wrong");
    chk(r1b == '0, "divergence: read1b blocked");
    // transient difference in round 5
    run_op(pt, key, 2, 5, ct, r1b, r1ub, r2, arr, aur, are);
    chk(arr[1:0] == 2'b11 && aur[1:0] == 2'b00, $sformatf("transient code 3: r=%b ur=%b", arr, aur));
    chk(are[3:2] == 2'b00 && r2 == ct && r1ub == ct, "transient: read-out correct, DEFCON2 quiet");
    chk(r1b == '0, "transient: read1b blocked");
    // read address fault on engine 2 from read 2
    run_op(pt, key, 3, 0, ct, r1b, r1ub, r2, arr, aur, are);
    chk(arr == 4'b0000, "read fault: rounds clean");
    chk(are == 4'b1100, $sformatf("read fault: DEFCON2 alarms %b", are));
    chk(r1b[63:0] == ct[63:0] && r1b[127:64] == '0, "read fault: partial block");
    // monitor upset: DEFCON1 rxor 7, table bit 15 (all four inputs 1, first copy)
    begin
      int f;
      f = (NL - 1 - 7) * CFG_W + CFG_W - 1 - 5 - 15;
      rotate(f);
      // all-ones round register makes rxor 7 read its upset entry on purpose
      @(negedge clk);
      start     = 1'b1;
      rd_start1 = 1'b1;
      rd_start2 = 1'b1;
      rd_addr1  = '0;
      rd_addr2  = '0;
      state1    = '1;
      state2    = '1;
      @(negedge clk);
      start     = 1'b0;
      rd_start1 = 1'b0;
      rd_start2 = 1'b0;
      @(negedge clk);
      chk(alarm_r[1:0] == 2'b11 && alarm_r[3:2] == 2'b00, $sformatf("false positive %b", alarm_r));
      csw   = 1'b1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      @(negedge clk);
      @(negedge clk);
      chk(alarm_r == 4'b0000 && alarm_ur == 4'b0000, "correct_sw repairs the upset");
      state2[9] = 1'b0;
      @(negedge clk);
      chk(alarm_r[1:0] == 2'b11, "detection kept with correct_sw");
      csw = 1'b0;
      rotate(f);
    end
    run_op({$urandom(), $urandom(), $urandom(), $urandom()}, key, 0, 0, ct, r1b, r1ub, r2, arr, aur, are);
    chk(are == 4'b0000 && r1b == ct, "scrubbed: fault-free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
