// tb_rtu_bus_if -- self-checking test of the RTU's bus register interface.
// The process table, scheduler, dispatcher, timer and trace FIFO around it are
// played by the testbench. Checks the register map (read/write and read-only
// registers, the trace read strobe), the service handshake (request fields, the
// acknowledge with return code and value, end_of_service, no second service
// inside one), the process-switch interrupt (raised only outside services and
// when switching is enabled, cleared by the acknowledge, which performs the
// switch and shows the new process with its wake code and value), collisions,
// the direct switch at end_of_service after a blocking service, and the
// round-robin yield flags.
module tb_rtu_bus_if;
  import rtu_pkg::*;

  localparam int NP = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] addr;
  logic we, re;
  logic [31:0] wdata, rdata;
  logic [2:0] irq, nxt_valid, sw_pulse, yield, rr_expire;
  svc_req_t req;
  act_t act;
  tinfo_t tab [NP];
  pid_t nxt_pid [NCPU];
  logic sw_valid, sw_new_valid, dbg_rd;
  cpu_t sw_cpu;
  pid_t sw_new;
  logic [31:0] totr, atdr, tcr, atcr, dbg_data;
  logic [15:0] rrtr [NCPU];
  int checks = 0, failures = 0;
  int n_sw = 0;
  logic [31:0] s;

  rtu_bus_if #(.NPROC(NP)) dut (
    .clk, .rst_n, .addr, .we, .re, .wdata, .rdata, .irq, .req, .act, .tab, .nxt_valid,
    .nxt_pid, .sw_valid, .sw_cpu, .sw_new_valid, .sw_new, .sw_pulse, .yield, .totr, .atdr,
    .rrtr, .tcr, .atcr, .rr_expire, .dbg_rd, .dbg_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (sw_valid) n_sw++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: sr=%h irq=%b", what, s, irq);
    end
  endtask

  // write: drive at the falling edge, look at the combinational outputs, clock it
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    addr = a;
    we = 1'b1;
    wdata = d;
    #1;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] r);
    @(negedge clk);
    addr = a;
    we = 1'b0;
    re = 1'b1;
    #1;
    r = rdata;
  endtask

  task automatic quiet();
    @(negedge clk);
    we = 1'b0;
    re = 1'b0;
    #1;
  endtask

  task automatic run(int pid, int c);
    tab[pid].st = T_RUNNING;
    tab[pid].cpu = cpu_t'(c);
  endtask

  initial begin
    addr = '0;
    we = 1'b0;
    re = 1'b0;
    wdata = '0;
    act = '0;
    nxt_valid = '0;
    for (int c = 0; c < NCPU; c++) nxt_pid[c] = '0;
    for (int i = 0; i < NP; i++) tab[i] = '0;
    tcr = 32'd1234;
    atcr = 32'd77;
    rr_expire = '0;
    dbg_data = 32'hCAFE_0001;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    rd(8'h00, s);
    chk("version", s == 32'h104);
    rd(8'h24, s);
    chk("tick divider reset value", s == 50);
    rd(8'h04, s);
    chk("time counter", s == 1234);
    rd(8'h2C, s);
    chk("absolute timer", s == 77);
    rd(8'h08, s);
    chk("trace word and pop strobe", s == 32'hCAFE_0001 && dbg_rd);
    quiet();
    chk("no pop strobe without read", !dbg_rd);
    wr(8'h24, 32'd9);
    wr(8'h28, 32'd300);
    wr(8'h20, 32'd2);
    wr(8'h40, 32'd3);
    wr(8'h60, 32'd4);
    quiet();
    chk("timer registers", totr == 9 && atdr == 300 && rrtr[0] == 2 && rrtr[1] == 3 && rrtr[2] == 4);
    rd(8'h40, s);
    chk("read back slice", s == 3);
    wr(8'h2C, 32'd5);
    quiet();
    rd(8'h2C, s);
    chk("absolute timer read-only", s == 77);
    rd(8'h50, s);
    chk("cpu 2 idle", s[7] == 1'b1 && irq == 0);

    // a process becomes ready for CPU 0
    tab[3].st = T_READY;
    tab[3].wcode = RC_TIMEOUT;
    tab[3].wval = 16'h1234;
    nxt_valid[0] = 1'b1;
    nxt_pid[0] = 8'd3;
    @(negedge clk);
    @(negedge clk);
    chk("switch interrupt raised", irq == 3'b001);
    wr(8'h14, {OP_SEM_READ, 24'd0});
    chk("collision: service not executed", !req.valid);
    quiet();
    rd(8'h10, s);
    chk("collision flag and rejected", s[30] && s[27:24] == RC_REJECTED && !s[31]);
    wr(8'h18, 32'd1);
    chk("acknowledge switches", sw_valid && sw_cpu == 0 && sw_new_valid && sw_new == 3);
    quiet();
    run(3, 0);
    rd(8'h10, s);
    chk("new process with its wake code", s[6:0] == 3 && !s[7] && !s[29] && !s[30] &&
        s[27:24] == RC_TIMEOUT && s[23:8] == 16'h1234);
    chk("interrupt cleared", irq == 0);

    // a service
    act.rcode = RC_OK;
    act.rval = 16'h0055;
    wr(8'h14, {OP_SEM_READ, 24'h00_0102});
    chk("request fields", req.valid && req.cpu == 0 && req.caller_valid && req.caller == 3 &&
        req.op == OP_SEM_READ && req.arg == 24'h102);
    quiet();
    act = '0;
    rd(8'h10, s);
    chk("acknowledge with result", s[31] && s[27:24] == RC_OK && s[23:8] == 16'h55);
    nxt_pid[0] = 8'd4;
    tab[4].st = T_READY;
    repeat (3) @(negedge clk);
    chk("no interrupt inside a service", irq == 0);
    wr(8'h14, {OP_SEM_READ, 24'd0});
    chk("no second service inside one", !req.valid);
    quiet();
    rd(8'h10, s);
    chk("second service rejected", s[27:24] == RC_REJECTED);
    wr(8'h18, 32'd2);                       // disable switching
    wr(8'h14, {OP_END, 24'd0});
    chk("end of service of a running caller does not switch", !sw_valid);
    quiet();
    rd(8'h10, s);
    chk("acknowledge dropped", !s[31]);
    repeat (3) @(negedge clk);
    chk("switching disabled", irq == 0);
    wr(8'h18, 32'd0);
    quiet();
    @(negedge clk);
    chk("interrupt after enabling", irq[0]);
    wr(8'h18, 32'd1);
    quiet();
    tab[3].st = T_READY;
    run(4, 0);

    // blocking service: direct switch at end_of_service
    act.rcode = RC_NOT_FREE;
    act.block = 1'b1;
    act.bpid = 8'd4;
    wr(8'h14, {OP_SEM_PEND, 24'd0});
    quiet();
    act = '0;
    tab[4].st = T_BLOCKED;
    tab[5].st = T_READY;
    tab[5].wval = 16'd7;
    nxt_pid[0] = 8'd5;
    rd(8'h10, s);
    chk("blocked flag", s[31] && s[28] && s[27:24] == RC_NOT_FREE);
    repeat (3) @(negedge clk);
    chk("still no interrupt", irq == 0);
    wr(8'h14, {OP_END, 24'd0});
    chk("direct switch", sw_valid && sw_new == 5 && sw_pulse == 3'b001);
    quiet();
    run(5, 0);
    rd(8'h10, s);
    chk("next process shown", s[6:0] == 5 && !s[31] && !s[28] && s[23:8] == 7);
    @(negedge clk);
    chk("no interrupt after direct switch", irq == 0);

    // round-robin yield flag
    @(negedge clk);
    rr_expire = 3'b010;
    @(negedge clk);
    rr_expire = 3'b000;
    chk("yield set", yield == 3'b010);
    nxt_valid[1] = 1'b1;
    nxt_pid[1] = 8'd6;
    tab[6].st = T_READY;
    @(negedge clk);
    @(negedge clk);
    chk("cpu 1 interrupt", irq[1]);
    wr(8'h38, 32'd1);
    quiet();
    chk("switch clears yield", yield == 3'b000 && n_sw == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
