// tb_mkvc_cpu_if: checks the processor handshake against a model core.
// The model core answers each request `lat` clocks later with data derived
// from the address. The testbench checks: the address/data/direction passed
// to the core; ACKB goes low exactly two clock edges after the start edge
// (three with the CPU wait state, more when the core is slow); ACKB lasts one
// clock, or as long as HOLDB is low; read data is presented only while ACKB
// is low; STARTB held high blocks an access; pulsing STARTB with READB held
// low starts an access.
module tb_mkvc_cpu_if;
  import mkvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic readb = 1, writeb = 1, startb = 0, holdb = 1, wait_cpu = 0;
  logic [AW-1:0] addr_in = '0;
  logic [DW-1:0] din = '0, dout, rdata;
  logic ackb, dout_en, req_valid, req_write, done;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_data;
  int checks = 0, failures = 0, lat = 1, reqs = 0;
  logic [AW-1:0] last_addr;
  logic [DW-1:0] last_data;
  logic last_write;

  mkvc_cpu_if dut (.clk, .rst_n, .readb, .writeb, .startb, .holdb, .addr_in, .din, .wait_cpu,
                   .ackb, .dout, .dout_en, .req_valid, .req_write, .req_addr, .req_data,
                   .done, .rdata);
  always #5 clk = ~clk;

  // model core
  int cnt = -1;
  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (req_valid) begin
      reqs++;
      last_addr <= req_addr; last_data <= req_data; last_write <= req_write;
      cnt <= lat - 2;
      if (lat == 1) begin done <= 1'b1; rdata <= {52'hABCDE_0000_1234, req_addr}; cnt <= -1; end
    end else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin done <= 1'b1; rdata <= {52'hABCDE_0000_1234, last_addr}; cnt <= -1; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one access; returns the number of posedges from the start edge to the first
  // edge that samples ACKB low, and the number of edges it stays low
  task automatic access(input bit write, input logic [AW-1:0] a, input logic [DW-1:0] d,
                        input int hold_cycles, output int t_ack, output int n_ack,
                        output logic [DW-1:0] rd);
    @(negedge clk);
    addr_in = a; din = d;
    if (write) writeb = 0; else readb = 0;
    if (hold_cycles > 0) holdb = 0;
    @(negedge clk);                       // start edge has passed
    readb = 1; writeb = 1;
    t_ack = 1;
    while (ackb) begin
      @(posedge clk); #1;
      t_ack++;
      if (t_ack > 50) break;
    end
    // ACKB now low (it went low at edge t_ack-1... counted as edges after start)
    rd = dout;
    chk(dout_en == !write, "dout_en only on reads during ACK");
    n_ack = 0;
    while (!ackb) begin
      if (n_ack == hold_cycles) holdb = 1;
      @(posedge clk); #1;
      n_ack++;
      if (n_ack > 50) break;
    end
    chk(!dout_en, "data removed after ACK");
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, n;
    logic [DW-1:0] rd;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // read, no wait state
    access(0, 12'h123, '0, 0, t, n, rd);
    chk(t == 3, $sformatf("read ACK latency %0d", t));
    chk(n == 1, "ACK one clock");
    chk(rd == {52'hABCDE_0000_1234, 12'h123}, "read data");
    chk(last_addr == 12'h123 && !last_write, "request to core");
    // write
    access(1, 12'h2A4, 64'hFEDC_BA98_7654_3210, 0, t, n, rd);
    chk(t == 3 && n == 1, "write timing");
    chk(last_addr == 12'h2A4 && last_write && last_data == 64'hFEDC_BA98_7654_3210, "write request");
    // HOLDB extends ACK
    access(0, 12'h001, '0, 4, t, n, rd);
    chk(n == 5, $sformatf("HOLDB extends ACK (%0d)", n));
    // CPU wait state
    wait_cpu = 1;
    access(0, 12'h002, '0, 0, t, n, rd);
    chk(t == 4, $sformatf("wait state latency %0d", t));
    wait_cpu = 0;
    // slow core
    lat = 10;
    access(0, 12'h003, '0, 0, t, n, rd);
    chk(t == 12, $sformatf("slow core latency %0d", t));
    lat = 1;
    // STARTB high inhibits
    begin
      int n_before;
      n_before = reqs;
      @(negedge clk) begin startb = 1; readb = 0; end
      repeat (5) @(negedge clk);
      chk(reqs == n_before && ackb, "STARTB high blocks access");
      // now pulse STARTB with READB held low
      startb = 0;
      @(negedge clk) startb = 1;
      repeat (6) @(negedge clk);
      chk(reqs == n_before + 1, "STARTB pulse starts one access");
      readb = 1; startb = 0;
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
