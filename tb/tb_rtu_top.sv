// tb_rtu_top -- end-to-end test of the Real-Time Unit through its bus registers.
// Three CPU models share the RTU's bus through the arbiter and use it only as
// software would: writing service words, reading status registers, acknowledging
// process-switch interrupts and writing timer registers. The scenario boots two
// processes on CPU 0, then makes each kernel mechanism happen: switch interrupt,
// service collision, semaphore block and wake, message hand-over and the reserved
// last place of a VCB slot, delay, priority inheritance and a timed-out resource
// queue take, periodic start, an external interrupt, round-robin between equal
// priorities on CPU 1, the absolute timer, the debug trace and its overflow, and
// bus contention. Every mechanism is counted; one that never happened is a
// failure. Runs at reduced sizes (16 processes, small units, 4 cycles per tick).
module tb_rtu_top;
  import rtu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  addr;
  logic        we, re;
  logic [31:0] wdata, rdata;
  logic [2:0]  irq, bus_req, bus_gnt;
  logic [3:0]  ext_irq;
  logic        at_event, dbg_overflow;
  int checks = 0, failures = 0;

  typedef enum int {
    M_SWITCH_IRQ, M_COLLISION, M_SEM_BLOCK, M_SEM_WAKE, M_VCB_HANDOVER, M_VCB_RESERVED,
    M_DELAY, M_PRIO_INHERIT, M_RQ_TIMEOUT, M_PERIOD, M_EXT_IRQ, M_ROUND_ROBIN,
    M_ABS_TIMER, M_DBG_OVERFLOW, M_BUS_CONTENTION, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  rtu_top #(.NPROC(16), .NIRQ(4), .NSEM(4), .SEM_MAX(16), .NSLOT(4), .DEPTH(4), .NRQ(8),
            .DBG_DEPTH(4), .TICK_DIV(32'd4)) dut (
    .clk, .rst_n, .addr, .we, .re, .wdata, .rdata, .irq, .ext_irq, .bus_req, .bus_gnt,
    .at_event, .dbg_overflow);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (at_event) mech[M_ABS_TIMER]++;
    if (dbg_overflow) mech[M_DBG_OVERFLOW]++;
    if ($countones(bus_req) > 1) mech[M_BUS_CONTENTION]++;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (time %0t)", what, $time);
    end
  endtask

  // one bus access by CPU c, through the arbiter
  task automatic acc(int c, bit w, logic [7:0] a, logic [31:0] d, output logic [31:0] r);
    int n;
    @(negedge clk);
    bus_req[c] = 1'b1;
    n = 0;
    while (!bus_gnt[c]) begin
      @(negedge clk);
      n++;
      if (n > 100) begin
        chk("bus granted", 1'b0);
        break;
      end
    end
    addr = a;
    we = w;
    re = !w;
    wdata = d;
    #1;
    r = rdata;
    @(negedge clk);
    we = 1'b0;
    re = 1'b0;
    bus_req[c] = 1'b0;
  endtask

  task automatic wr(int c, logic [7:0] a, logic [31:0] d);
    logic [31:0] r;
    acc(c, 1'b1, a, d, r);
  endtask

  task automatic rd(int c, logic [7:0] a, output logic [31:0] r);
    acc(c, 1'b0, a, '0, r);
  endtask

  function automatic logic [7:0] sr_a(int c);
    return 8'(8'h10 + 8'h20 * c);
  endfunction

  // status register fields
  function automatic logic sr_ack(logic [31:0] s);  return s[31]; endfunction
  function automatic logic sr_coll(logic [31:0] s); return s[30]; endfunction
  function automatic logic sr_blk(logic [31:0] s);  return s[28]; endfunction
  function automatic int   sr_rc(logic [31:0] s);   return int'(s[27:24]); endfunction
  function automatic int   sr_val(logic [31:0] s);  return int'(s[23:8]); endfunction
  function automatic int   sr_pid(logic [31:0] s);  return int'(s[6:0]); endfunction

  task automatic svc(int c, svc_op_e op, logic [23:0] arg, output logic [31:0] s);
    wr(c, sr_a(c) + 8'h04, {op, arg});
    rd(c, sr_a(c), s);
  endtask

  task automatic svc_end(int c, output logic [31:0] s);
    wr(c, sr_a(c) + 8'h04, {OP_END, 24'd0});
    rd(c, sr_a(c), s);
  endtask

  // service with end_of_service, the caller keeps running
  task automatic call(int c, svc_op_e op, logic [23:0] arg, output logic [31:0] s);
    logic [31:0] e;
    svc(c, op, arg, s);
    chk($sformatf("ack of op %h", op), sr_ack(s));
    svc_end(c, e);
    chk($sformatf("ack dropped after op %h", op), !sr_ack(e));
  endtask

  task automatic wait_irq(int c);
    int n;
    n = 0;
    while (!irq[c] && n < 3000) begin
      @(negedge clk);
      n++;
    end
    chk($sformatf("switch interrupt on cpu %0d", c), irq[c]);
  endtask

  task automatic take_irq(int c, output logic [31:0] s);
    wait_irq(c);
    wr(c, sr_a(c) + 8'h08, 32'd1);
    rd(c, sr_a(c), s);
    chk("interrupt cleared by acknowledge", !s[29]);
    mech[M_SWITCH_IRQ]++;
  endtask

  function automatic logic [23:0] mk(int pid, int prio, int mask);
    return {5'd0, 3'(mask), 2'd0, 6'(prio), 8'(pid)};
  endfunction

  initial begin
    logic [31:0] s, e;
    for (int i = 0; i < M_COUNT; i++) mech[i] = 0;
    addr = '0;
    we = 1'b0;
    re = 1'b0;
    wdata = '0;
    bus_req = '0;
    ext_irq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // boot code on CPU 0
    rd(0, 8'h00, s);
    chk("version register", s == 32'h104);
    rd(0, 8'h24, s);
    chk("tick divider reset value", s == 4);
    rd(0, sr_a(0), s);
    chk("cpu 0 idle after reset", s[7] == 1'b1);
    call(0, OP_CREATE, mk(1, 10, 3'b001), s);
    chk("create 1", sr_rc(s) == RC_OK);
    call(0, OP_CREATE, mk(2, 5, 3'b001), s);
    chk("create 2", sr_rc(s) == RC_OK);
    // end_of_service on an idle CPU switches straight to the chosen process
    rd(0, sr_a(0), s);
    chk("first process starts at end_of_service", sr_pid(s) == 1 && s[7] == 1'b0 && !s[29]);
    chk("cpu 2 has nothing to run", irq[2] == 1'b0);

    // semaphore: process 1 blocks, 2 runs and releases, 1 preempts 2
    call(0, OP_SEM_CREATE, 24'd0, s);
    svc(0, OP_SEM_PEND, 24'd0, s);
    chk("pend on empty semaphore blocks", sr_rc(s) == RC_NOT_FREE && sr_blk(s));
    svc_end(0, s);
    chk("direct switch to process 2", sr_pid(s) == 2 && !sr_ack(s));
    if (sr_pid(s) == 2) mech[M_SEM_BLOCK]++;
    call(0, OP_SEM_RELEASE, 24'd0, s);
    chk("release", sr_rc(s) == RC_OK);
    wait_irq(0);
    svc(0, OP_SEM_READ, 24'd0, s);
    chk("service during pending interrupt collides", sr_coll(s) && sr_rc(s) == RC_REJECTED &&
        !sr_ack(s));
    if (sr_coll(s)) mech[M_COLLISION]++;
    take_irq(0, s);
    chk("woken process preempts", sr_pid(s) == 1 && sr_rc(s) == RC_OK && !sr_coll(s));
    if (sr_pid(s) == 1) mech[M_SEM_WAKE]++;

    // virtual communication bus: hand-over to a blocked receiver
    call(0, OP_VCB_ALLOC, {10'd0, 1'b0, 1'b0, 1'b1, 6'd10, 5'd0}, s);
    chk("slot allocated", sr_rc(s) == RC_OK);
    svc(0, OP_VCB_GET, {2'd0, 16'd0, 1'b1, 5'd0}, s);
    chk("get on empty slot blocks", sr_rc(s) == RC_BLOCKED && sr_blk(s));
    svc_end(0, s);
    chk("switch to sender", sr_pid(s) == 2);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd1, 5'd0}, s);
    chk("put ref 0", sr_rc(s) == RC_OK && sr_val(s) == 0);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd1, 5'd0}, s);
    chk("put ref 1", sr_rc(s) == RC_OK && sr_val(s) == 1);
    call(0, OP_VCB_PUT_RDY, 24'd1, s);
    chk("put_ready", sr_rc(s) == RC_OK);
    take_irq(0, s);
    chk("receiver gets the reference", sr_pid(s) == 1 && sr_rc(s) == RC_OK && sr_val(s) == 1);
    if (sr_pid(s) == 1 && sr_val(s) == 1) mech[M_VCB_HANDOVER]++;
    call(0, OP_VCB_GET_RDY, 24'd1, s);
    chk("get_ready", sr_rc(s) == RC_OK && sr_val(s) == 0);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd1, 5'd0}, s);
    chk("put ref 1 again", sr_val(s) == 1);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd1, 5'd0}, s);
    chk("put ref 2", sr_val(s) == 2);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd1, 5'd0}, s);
    chk("last place kept back", sr_rc(s) == RC_FULL);
    if (sr_rc(s) == RC_FULL) mech[M_VCB_RESERVED]++;
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd3, 5'd0}, s);
    chk("urgent message gets last place", sr_rc(s) == RC_OK && sr_val(s) == 3);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd3, 5'd0}, s);
    chk("slot full", sr_rc(s) == RC_FULL);

    // delay
    svc(0, OP_DELAY, 24'd3, s);
    chk("delay blocks", sr_rc(s) == RC_BLOCKED && sr_blk(s));
    svc_end(0, s);
    chk("switch during delay", sr_pid(s) == 2);
    take_irq(0, s);
    chk("delay over", sr_pid(s) == 1 && sr_rc(s) == RC_OK);
    if (sr_pid(s) == 1) mech[M_DELAY]++;

    // resource queue: inheritance and timeout
    call(0, OP_RQ_CREATE, {6'd0, 1'b0, 1'b1, 8'd1, 8'd1}, s);
    chk("mutex created", sr_rc(s) == RC_OK && sr_val(s) == 0);
    svc(0, OP_DELAY, 24'd20, s);
    svc_end(0, s);
    call(0, OP_RQ_TAKE, {14'd0, 2'd0, 8'd0}, s);
    chk("process 2 takes the mutex", sr_rc(s) == RC_OK);
    take_irq(0, s);
    chk("back to 1", sr_pid(s) == 1);
    svc(0, OP_RQ_TAKE, {14'd30, 2'd2, 8'd0}, s);
    chk("timed take blocks", sr_rc(s) == RC_BLOCKED && sr_blk(s));
    svc_end(0, s);
    chk("owner runs", sr_pid(s) == 2);
    call(0, OP_TASK_INFO, 24'd2, s);
    chk("owner inherits priority 10", sr_val(s) % 64 == 10);
    if (sr_val(s) % 64 == 10) mech[M_PRIO_INHERIT]++;
    repeat (160) @(negedge clk);
    chk("no switch at equal priority", irq[0] == 1'b0);
    call(0, OP_RQ_GIVE, {14'd0, 2'd0, 8'd0}, s);
    chk("give", sr_rc(s) == RC_OK);
    take_irq(0, s);
    chk("take timed out", sr_pid(s) == 1 && sr_rc(s) == RC_TIMEOUT);
    if (sr_rc(s) == RC_TIMEOUT) mech[M_RQ_TIMEOUT]++;
    call(0, OP_TASK_INFO, 24'd2, s);
    chk("owner back to base priority", sr_val(s) % 64 == 5);

    // periodic process
    call(0, OP_SET_PERIOD, 24'd6, s);
    svc(0, OP_WAIT_PERIOD, 24'd0, s);
    chk("waits for period", sr_rc(s) == RC_BLOCKED && sr_blk(s));
    svc_end(0, s);
    take_irq(0, s);
    chk("period start", sr_pid(s) == 1);
    if (sr_pid(s) == 1) mech[M_PERIOD]++;
    call(0, OP_SET_PERIOD, 24'd0, s);

    // external interrupt
    svc(0, OP_WAIT_IRQ, 24'd1, s);
    chk("waits for interrupt", sr_blk(s));
    svc_end(0, s);
    repeat (20) @(negedge clk);
    chk("no wake without interrupt", irq[0] == 1'b0);
    ext_irq[1] = 1'b1;
    repeat (3) @(negedge clk);
    ext_irq[1] = 1'b0;
    take_irq(0, s);
    chk("interrupt process runs", sr_pid(s) == 1);
    if (sr_pid(s) == 1) mech[M_EXT_IRQ]++;

    // round robin on CPU 1
    call(0, OP_CREATE, mk(3, 3, 3'b010), s);
    call(0, OP_CREATE, mk(4, 3, 3'b010), s);
    wr(0, 8'h40, 32'd2);
    take_irq(1, s);
    chk("cpu 1 runs process 3", sr_pid(s) == 3);
    take_irq(1, s);
    chk("slice over, process 4", sr_pid(s) == 4);
    if (sr_pid(s) == 4) mech[M_ROUND_ROBIN]++;
    take_irq(1, s);
    chk("and back to 3", sr_pid(s) == 3);
    wr(0, 8'h40, 32'd0);

    // absolute timer
    wr(0, 8'h28, 32'd3);
    repeat (60) @(negedge clk);
    rd(0, 8'h2C, s);
    chk("absolute timer counts", s >= 1 && s <= 3);

    // debug trace
    rd(0, 8'h08, s);
    chk("trace word present", s != 0);
    rd(0, 8'h04, e);
    chk("time counter runs", e > 100);

    // three CPUs read at the same time
    fork
      for (int k = 0; k < 4; k++) begin
        logic [31:0] r0;
        rd(0, 8'h00, r0);
        chk("cpu 0 read under contention", r0 == 32'h104);
      end
      for (int k = 0; k < 4; k++) begin
        logic [31:0] r1;
        rd(1, 8'h00, r1);
        chk("cpu 1 read under contention", r1 == 32'h104);
      end
      for (int k = 0; k < 4; k++) begin
        logic [31:0] r2;
        rd(2, 8'h00, r2);
        chk("cpu 2 read under contention", r2 == 32'h104);
      end
    join

    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %s happened %0d times", mech_e'(i), mech[i]);
      chk($sformatf("mechanism %s happened", mech_e'(i)), mech[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
