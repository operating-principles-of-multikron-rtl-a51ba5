// tb_multikron_vc: end-to-end test of the MultiKron_vc chip at its default
// size (4 banks of 16 counters), driven only through its pins, with the
// SRAM model on the memory pins. The Node clock has a 10 ns period and the
// Timestamp clock a 50 ns period (the 50 MHz / 10 MHz ratio of the design
// target). Every mechanism of the chip is made to happen and counted; one
// that never happens counts as a failure:
//   register map and unused bits, Timestamp counting, read-with-copy and
//   read-without-copy (shadow registers), Node clock stop-watch, software
//   increment, 64-bit pair carry, 32-bit wrap, external edge and gated
//   counting, TSclk/10 and TSclk/100, zero fields leaving control fields
//   unchanged, bank clear, bank registers and invalidate, STORE / LOAD / SWAP
//   through the SRAM, skipped STORE of an invalid bank, 32-bit data mode with
//   the High Order register, HOLDB, STARTB gating, CPU and SRAM wait states,
//   OE, software reset, test mode.
module tb_multikron_vc;
  import mkvc_pkg::*;

  logic node_clk = 0, ts_clk = 0, resetb = 0, testb = 1, oe = 1, wcpu = 0, wmem = 0;
  logic readb = 1, writeb = 1, startb = 0, holdb = 1;
  logic [11:0] ac = '0;
  logic [63:0] d_in = '0, d_out;
  logic d_oe, ackb;
  logic [15:0] x = '0;
  logic [15:0] am;
  logic [39:0] m_in, m_out;
  logic m_oe, mem_r_wb, mem_oeb, mem_ce1b, mem_ce2h;

  multikron_vc dut (.*);

  mkvc_sram_model u_mem (.addr(am), .wdata(m_out), .rdata(m_in), .r_wb(mem_r_wb),
                         .oeb(mem_oeb), .ce1b(mem_ce1b), .ce2h(mem_ce2h));

  always #5  node_clk = ~node_clk;
  always #25 ts_clk   = ~ts_clk;

  int checks = 0, failures = 0;
  int seen [string];
  int last_lat;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s  (t=%0t)", what, $time); end
  endtask

  task automatic mark(input string m);
    if (!seen.exists(m)) seen[m] = 0;
    seen[m]++;
  endtask

  // ---------------- bus cycles ----------------
  // one processor access; `use_start` keeps READB/WRITEB low and pulses STARTB
  task automatic access(input bit write, input logic [11:0] a, input logic [63:0] d,
                        output logic [63:0] rd, input int hold = 0, input bit use_start = 0);
    int n;
    @(negedge node_clk);
    ac = a; d_in = d;
    if (use_start) begin startb = 1; @(negedge node_clk); end
    if (write) writeb = 0; else readb = 0;
    if (use_start) startb = 0;
    if (hold > 0) holdb = 0;
    @(negedge node_clk);
    if (!use_start) begin readb = 1; writeb = 1; end
    else startb = 1;
    last_lat = 1;
    while (ackb) begin
      @(negedge node_clk); last_lat++;
      if (last_lat > 400) begin chk(0, "no ACKB"); break; end
    end
    rd = d_out;
    if (!write) chk(d_oe == oe, "read data driven during ACKB when OE is high");
    n = 0;
    while (!ackb) begin
      n++;
      if (n >= hold) holdb = 1;
      @(negedge node_clk);
      if (n > 100) break;
    end
    chk(!d_oe, "read data removed after ACKB");
    if (hold > 0) begin chk(n == hold, $sformatf("HOLDB kept ACKB low %0d clocks", n)); mark("holdb"); end
    else chk(n == 1, "ACKB lasts one clock");
    if (use_start) begin readb = 1; writeb = 1; startb = 0; end
  endtask

  task automatic wr(input logic [11:0] a, input logic [63:0] d);
    logic [63:0] dummy;
    access(1, a, d, dummy);
  endtask

  task automatic rd(input logic [11:0] a, output logic [63:0] d);
    access(0, a, '0, d);
  endtask

  function automatic logic [11:0] A(input int cmd, input int b, input int n);
    return 12'(cmd * 256 + b * 16 + n);
  endfunction

  task automatic hw_reset(input bit wc, input bit wm);
    @(negedge node_clk);
    resetb = 0; wcpu = wc; wmem = wm;
    repeat (6) @(negedge node_clk);
    resetb = 1;
    @(negedge node_clk);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, v2, v3;
    time t0, t1;
    int w0;

    hw_reset(0, 0);

    // ---- register map basics ----
    rd(A(0, 0, 1), v);
    chk(v == 64'hFFFF_FFFF_FFFF_0000, $sformatf("CSR after reset %h", v));
    chk(last_lat == 3, $sformatf("read latency %0d without CPU wait state", last_lat));
    rd(A(0, 0, 5), v);
    chk(v == '1, "unused address reads ones");
    rd(A(1, 5, 0), v);
    chk(v == '1, "unbuilt bank reads ones");
    rd(A(3, 0, 4), v);
    chk(v == 64'hFFFF_FFFF_FFFF_FFFF, "config register default 1111");
    rd(A(3, 0, 3), v);
    chk(v == 64'h1111_1111_1111_1111, "enable register default 0001");

    // ---- Timestamp ----
    rd(A(0, 0, 2), v);
    repeat (100) @(negedge node_clk);
    rd(A(0, 0, 2), v2);
    chk(v[63:56] == 8'hFF, "Timestamp unused bits read ones");
    chk(v2[55:0] - v[55:0] inside {[20:22]}, $sformatf("Timestamp advanced %0d", v2[55:0] - v[55:0]));
    mark("timestamp");

    // ---- Node clock stop-watch and shadow registers, bank 0 ----
    wr(A(3, 0, 4), 64'h0000_0000_0000_00DD);        // n0, n1: Node clock
    wr(A(3, 0, 3), 64'h0000_0000_0000_0033);        // clear and enable n0, n1
    rd(A(3, 0, 4), v);
    chk(v == 64'hFFFF_FFFF_FFFF_FFDD, "zero config fields leave other counters unchanged");
    rd(A(3, 0, 3), v);
    chk(v == 64'h1111_1111_1111_1122, "enable register readback");
    mark("zero_field_nop");
    t0 = $time;
    rd(A(1, 0, 0), v);                               // read with copy
    repeat (37) @(negedge node_clk);
    t1 = $time;
    rd(A(1, 0, 0), v2);
    chk(v2[31:0] - v[31:0] == 32'((t1 - t0) / 10), $sformatf("Node clock count %0d over %0d clocks",
        v2[31:0] - v[31:0], (t1 - t0) / 10));
    chk(v[63:32] == 32'hFFFF_FFFF, "32-bit read: upper bits ones");
    mark("copy_read");
    rd(A(4, 0, 1), v3);                              // without copy: same instant as v2
    chk(v3[31:0] == v2[31:0], "read-without-copy of n1 gives the copied instant");
    repeat (20) @(negedge node_clk);
    rd(A(4, 0, 0), v3);
    chk(v3 == v2, "read-without-copy repeats the last copy");
    mark("nocopy_read");
    wr(A(3, 0, 3), 64'h0000_0000_0000_0011);         // stop both
    rd(A(2, 0, 0), v);
    repeat (10) @(negedge node_clk);
    rd(A(2, 0, 0), v2);
    chk(v == v2 && v[31:0] == v[63:32], "disabled pair holds equal counts");
    mark("stopwatch");

    // ---- software increment, 64-bit pair and wrap, bank 1 ----
    wr(A(3, 1, 4), 64'h0000_0000_0074_0004);         // n0 sw, n4 sw (low), n5 upper half
    wr(A(3, 1, 3), 64'h0000_0000_0022_0002);
    wr(A(1, 1, 0), 64'h0);
    repeat (5) wr(A(4, 1, 0), '0);
    rd(A(1, 1, 0), v);
    chk(v[31:0] == 5, $sformatf("software increments %0d", v[31:0]));
    mark("sw_inc");
    wr(A(2, 1, 4), 64'h0000_0002_FFFF_FFFE);
    repeat (3) wr(A(4, 1, 4), '0);
    rd(A(2, 1, 4), v);
    chk(v == 64'h0000_0003_0000_0001, $sformatf("64-bit carry %h", v));
    mark("carry64");
    wr(A(3, 1, 4), 64'h0000_0000_0000_4000);         // n3 sw
    wr(A(3, 1, 3), 64'h0000_0000_0000_2000);
    wr(A(1, 1, 3), 64'hFFFF_FFFF);
    wr(A(4, 1, 3), '0);
    rd(A(1, 1, 3), v);
    chk(v[31:0] == 0, "32-bit counter wraps to zero");
    mark("wrap32");

    // ---- external and timestamp-derived sources, bank 2 ----
    wr(A(3, 2, 4), 64'h0000_0000_0000_FE91);         // n0 X edges, n1 Node gated by X1, n2 TS/10, n3 TS/100
    wr(A(3, 2, 3), 64'h0000_0000_0000_3333);
    rd(A(0, 0, 2), v3);
    repeat (7) begin
      @(negedge node_clk) x[0] = 1;
      repeat (2) @(negedge node_clk);
      x[0] = 0;
      repeat (2) @(negedge node_clk);
    end
    @(negedge node_clk) x[1] = 1;
    repeat (23) @(negedge node_clk);
    x[1] = 0;
    repeat (2000) @(negedge node_clk);
    wr(A(3, 2, 3), 64'h0000_0000_0000_1111);
    rd(A(0, 0, 2), v2);
    rd(A(2, 2, 0), v);
    chk(v[31:0] == 7, $sformatf("external edges %0d", v[31:0]));
    chk(v[63:32] == 23, $sformatf("Node clocks gated by X1 %0d", v[63:32]));
    mark("ext_edge"); mark("ext_gated");
    rd(A(2, 2, 2), v);
    // about (Timestamp delta)/10 and /100; phase of the prescalers unknown
    chk(int'(v[31:0]) inside {[int'((v2[55:0] - v3[55:0]) / 10) - 1 : int'((v2[55:0] - v3[55:0]) / 10) + 1]},
        $sformatf("TSclk/10 count %0d for %0d ticks", v[31:0], v2[55:0] - v3[55:0]));
    chk(int'(v[63:32]) inside {[int'((v2[55:0] - v3[55:0]) / 100) - 1 : int'((v2[55:0] - v3[55:0]) / 100) + 1]} &&
        v[63:32] > 0, $sformatf("TSclk/100 count %0d", v[63:32]));
    mark("ts_div10"); mark("ts_div100");

    // ---- bank registers, STORE, LOAD, SWAP ----
    rd(A(3, 0, 2), v);
    chk(v == 64'hFFFF_FFFF_FFFF_E000, $sformatf("bank register after reset %h", v));
    w0 = u_mem.writes;
    wr(A(5, 0, 1), '0);
    chk(u_mem.writes == w0, "STORE of an invalid bank writes nothing");
    mark("invalid_store_skip");
    wr(A(3, 0, 2), 64'h0AB);
    rd(A(3, 0, 2), v);
    chk(v == 64'hFFFF_FFFF_FFFF_F0AB, $sformatf("bank register write sets valid %h", v));
    wr(A(3, 0, 1), '0);
    rd(A(3, 0, 2), v);
    chk(v == 64'hFFFF_FFFF_FFFF_E0AB, "invalidate clears valid");
    wr(A(3, 0, 2), 64'h0AB);
    rd(A(2, 0, 0), v);                               // stopped pair values
    wr(A(5, 0, 1), '0);
    chk(last_lat == 3 + 1 + 16 * 3, $sformatf("STORE ACK after %0d clocks", last_lat));
    chk(u_mem.writes == w0 + 16, "STORE wrote 16 words");
    chk(u_mem.peek(16'h0AB0) == {4'hD, 4'h1, v[31:0]}, $sformatf("stored word 0 %h", u_mem.peek(16'h0AB0)));
    chk(u_mem.peek(16'h0AB1) == {4'hD, 4'h1, v[63:32]}, "stored word 1");
    chk(u_mem.peek(16'h0AB7) == {4'hF, 4'h1, 32'h0}, "stored word 7");
    rd(A(1, 0, 0), v2);
    chk(v2[31:0] == v[31:0], "STORE leaves the active bank unchanged");
    mark("store");
    for (int i = 0; i < 16; i++) u_mem.poke({12'h321, 4'(i)}, {4'h4, 4'h2, 32'(1000 + i)});
    wr(A(5, 3, 2), 64'hFFFF_F321);
    rd(A(3, 3, 2), v);
    chk(v[12:0] == 13'h1321, "LOAD sets bank register and valid");
    for (int i = 0; i < 16; i += 5) begin
      rd(A(1, 3, i), v);
      chk(v[31:0] == 1000 + i, $sformatf("loaded counter %0d = %0d", i, v[31:0]));
    end
    rd(A(3, 3, 4), v);
    chk(v == 64'h4444_4444_4444_4444, "loaded configuration fields");
    wr(A(4, 3, 2), '0);                              // loaded enable + software source
    rd(A(1, 3, 2), v);
    chk(v[31:0] == 1003, "loaded counter counts");
    mark("load");
    // SWAP bank 3 (home 321) with block 0AB (bank 0's stored copy)
    wr(A(5, 3, 3), 64'h0AB);
    chk(u_mem.peek(16'h3212) == {4'h4, 4'h2, 32'd1003}, "SWAP stored the old bank");
    rd(A(2, 3, 0), v2);
    rd(A(2, 0, 0), v);
    chk(v2 == v, "SWAP loaded the other bank");
    rd(A(3, 3, 2), v);
    chk(v[11:0] == 12'h0AB, "SWAP updated home");
    mark("swap");

    // ---- 32-bit data mode ----
    wr(A(0, 0, 1), 64'h4000);
    rd(A(0, 0, 1), v);
    chk(v[15:0] == 16'h4000, "32-bit mode flag");
    wr(A(0, 0, 7), 64'h0000_0000_1234_5678);
    wr(A(2, 1, 4), 64'hDEAD_BEEF_0000_0009);         // upper pins ignored, High Order reg used
    rd(A(2, 1, 4), v);
    chk(v[31:0] == 32'h9, "32-bit mode low half");
    rd(A(0, 0, 7), v);
    chk(v[31:0] == 32'h1234_5678, $sformatf("32-bit mode upper half from High Order reg %h", v));
    wr(A(0, 0, 1), 64'h8000);
    mark("mode32");

    // ---- HOLDB, STARTB, OE ----
    access(0, A(0, 0, 1), '0, v, 3, 0);
    access(0, A(0, 0, 1), '0, v, 0, 1);
    chk(v[15:0] == 16'h0000, "access started by STARTB");
    mark("startb_gate");
    oe = 0;
    rd(A(0, 0, 1), v);
    oe = 1;
    mark("oe_off");

    // ---- clear bank, software reset ----
    wr(A(3, 3, 0), '0);
    rd(A(2, 3, 0), v);
    chk(v == 0, "clear bank");
    mark("clear_bank");
    rd(A(0, 0, 2), v);
    wr(A(0, 0, 0), '0);
    rd(A(0, 0, 2), v2);
    chk(v2[55:0] > v[55:0], "software reset keeps the Timestamp");
    rd(A(3, 1, 4), v);
    chk(v == '1, "software reset restores configuration");
    rd(A(1, 1, 0), v);
    chk(v[31:0] == 0, "software reset clears counters");
    rd(A(3, 0, 2), v);
    chk(v[12] == 0, "software reset invalidates banks");
    mark("soft_reset");

    // ---- test mode ----
    testb = 0;
    wr(A(3, 0, 4), 64'h0000_0000_0000_000D);
    wr(A(3, 0, 3), 64'h0000_0000_0000_0003);
    wr(A(0, 0, 2), 64'h00AB_CDEF_0000_0000);
    wr(A(0, 0, 3), '0);
    wr(A(0, 0, 3), '0);
    repeat (30) @(negedge node_clk);
    rd(A(0, 0, 2), v);
    chk(v[55:0] == 56'hAB_CDEF_0000_0002, $sformatf("test mode Timestamp write+increment %h", v));
    rd(A(1, 0, 0), v);
    chk(v[31:0] == 0, "test mode stops hardware counting");
    wr(A(4, 0, 0), '0);                              // Node-clock counter stepped by the CPU
    wr(A(4, 0, 0), '0);
    wr(A(4, 0, 9), '0);                              // disabled counter stepped too
    rd(A(2, 0, 0), v);
    chk(v[31:0] == 2, "test mode increments any counter");
    rd(A(1, 0, 9), v);
    chk(v[31:0] == 1, "test mode increments a disabled counter");
    testb = 1;
    wr(A(0, 0, 2), '0);
    rd(A(0, 0, 2), v2);
    chk(v2[55:0] >= 56'hAB_CDEF_0000_0002, "Timestamp write ignored outside test mode");
    mark("test_mode");

    // ---- wait states ----
    hw_reset(1, 1);
    rd(A(0, 0, 1), v);
    chk(v[15:0] == 16'h3000, $sformatf("CSR wait-state bits %h", v[15:0]));
    chk(last_lat == 4, $sformatf("read latency %0d with CPU wait state", last_lat));
    mark("cpu_wait");
    wr(A(3, 2, 2), 64'h055);
    wr(A(5, 2, 1), '0);
    chk(last_lat == 4 + 1 + 16 * 4, $sformatf("STORE with SRAM wait state ACK after %0d", last_lat));
    chk(u_mem.peek(16'h0553) == {4'hF, 4'h1, 32'h0}, "STORE with wait state data");
    mark("mem_wait");

    // ---- every mechanism happened ----
    foreach (seen[m]) $display("  %-20s %0d", m, seen[m]);
    begin
      string need [] = '{"timestamp", "copy_read", "nocopy_read", "stopwatch", "zero_field_nop",
                         "sw_inc", "carry64", "wrap32", "ext_edge", "ext_gated", "ts_div10",
                         "ts_div100", "invalid_store_skip", "store", "load", "swap", "mode32",
                         "holdb", "startb_gate", "oe_off", "clear_bank", "soft_reset",
                         "test_mode", "cpu_wait", "mem_wait"};
      foreach (need[i]) begin
        checks++;
        if (!seen.exists(need[i])) begin failures++; $display("FAIL mechanism %s never happened", need[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
