// tb_mkvc_workload_paging: the paging workload of the MultiKron_vc at its
// default size, driven through the pins with the SRAM model attached.
// Part 1, context switching: bank 0 is the kernel's resident bank (Node clock
// counter); bank 1 holds the per-process system bank and is SWAPped at every
// context switch among 6 processes; bank 2 holds per-region banks of the
// running process and is SWAPped among 4 regions. Between switches the
// processes software-increment random counters. Every virtual counter's
// expected total is tracked, and at the end all banks are stored and every
// SRAM word is compared with it. Part 2, virtual counter range: bank 3 is
// stored at each of the 4096 home addresses (65,536 virtual counters), with
// a different value in counter 0 each time, and all 65,536 SRAM words are
// checked.
module tb_mkvc_workload_paging;
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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s  (t=%0t)", what, $time); end
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

  localparam int NPROC = 6, NREG = 4;
  // expected totals of every virtual counter: homes 0x100+p (system bank of
  // process p) and 0x200+4p+r (region r of process p)
  int exp_cnt [int][16];

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, k0, k1;
    int cur_proc, cur_reg, sw, homes_used;
    int home_list [$];

    @(negedge node_clk);
    repeat (6) @(negedge node_clk);
    resetb = 1;
    @(negedge node_clk);

    // every virtual bank starts in SRAM: software-increment source, enabled, zero
    for (int p = 0; p < NPROC; p++) begin
      home_list.push_back(12'h100 + p);
      for (int r = 0; r < NREG; r++) home_list.push_back(12'h200 + 4 * p + r);
    end
    foreach (home_list[i]) begin
      for (int n = 0; n < 16; n++) begin
        u_mem.poke({12'(home_list[i]), 4'(n)}, {4'h4, 4'h2, 32'h0});
        exp_cnt[home_list[i]][n] = 0;
      end
    end

    // kernel bank 0: counter 0 counts Node clocks
    wr(A(3, 0, 4), 64'hD);
    wr(A(3, 0, 3), 64'h3);
    rd(A(1, 0, 0), k0);

    cur_proc = -1; cur_reg = -1;
    for (int sw_i = 0; sw_i < 60; sw_i++) begin
      int p, r;
      p = $urandom % NPROC;
      r = $urandom % NREG;
      if (p != cur_proc) begin
        wr(A(5, 1, 3), 64'(12'h100 + p));           // context switch: swap system bank
        if (cur_proc < 0) mark("first_load_of_invalid_bank"); else mark("context_switch_swap");
        rd(A(3, 1, 2), v);
        chk(v[12:0] == {1'b1, 12'(12'h100 + p)}, "bank register follows the process");
        cur_proc = p;
        cur_reg = -1;
      end
      if (r != cur_reg) begin
        wr(A(5, 2, 3), 64'(12'h200 + 4 * p + r));   // region change: swap region bank
        mark("region_swap");
        cur_reg = r;
      end
      // the running process counts software events in both banks
      repeat (1 + $urandom % 12) begin
        int b, n;
        b = 1 + $urandom % 2;
        n = $urandom % 16;
        wr(A(4, b, n), '0);
        if (b == 1) exp_cnt[12'h100 + p][n]++;
        else        exp_cnt[12'h200 + 4 * p + r][n]++;
        mark("software_event");
      end
      // a read-with-copy of one counter matches the expectation
      begin
        int n;
        n = $urandom % 16;
        rd(A(1, 1, n), v);
        chk(v[31:0] == exp_cnt[12'h100 + p][n], $sformatf("live count p%0d n%0d", p, n));
      end
    end
    // write the resident banks back and compare every virtual counter
    wr(A(5, 1, 1), '0);
    wr(A(5, 2, 1), '0);
    foreach (home_list[i])
      for (int n = 0; n < 16; n++)
        chk(u_mem.peek({12'(home_list[i]), 4'(n)}) == {4'h4, 4'h2, 32'(exp_cnt[home_list[i]][n])},
            $sformatf("virtual counter %03h.%0d", home_list[i], n));
    rd(A(1, 0, 0), k1);
    chk(k1[31:0] > k0[31:0], "kernel bank stayed resident and kept counting");
    mark("kernel_resident");

    // 65,536 virtual counters: store bank 3 at every home address
    for (int n = 1; n < 16; n++) wr(A(1, 3, n), 64'(32'h5000_0000 + n));
    for (int h = 0; h < 4096; h++) begin
      wr(A(1, 3, 0), 64'(h));
      wr(A(3, 3, 2), 64'(h));
      wr(A(5, 3, 1), '0);
    end
    mark("home_sweep");
    homes_used = 0;
    for (int h = 0; h < 4096; h++) begin
      logic ok;
      ok = u_mem.peek({12'(h), 4'd0}) == {4'hF, 4'h1, 32'(h)};
      for (int n = 1; n < 16; n++)
        ok &= u_mem.peek({12'(h), 4'(n)}) == {4'hF, 4'h1, 32'h5000_0000 + 32'(n)};
      homes_used += int'(ok);
    end
    chk(homes_used == 4096, $sformatf("%0d of 4096 homes hold their bank", homes_used));

    foreach (seen[m]) $display("  %-28s %0d", m, seen[m]);
    begin
      string need [] = '{"first_load_of_invalid_bank", "context_switch_swap", "region_swap",
                         "software_event", "kernel_resident", "home_sweep"};
      foreach (need[i]) begin
        checks++;
        if (!seen.exists(need[i])) begin failures++; $display("FAIL %s never happened", need[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
