// tb_rtu_top_full -- the Real-Time Unit at its full default size (3 CPUs, 128
// processes, 64 priorities, 16 semaphores, 32 VCB slots of 28 messages, 256
// resource queues, 50 cycles per tick), taken through one complete exchange over
// the bus: boot creates two processes and a semaphore, the urgent one blocks on
// the semaphore and the RTU switches straight to the other, which releases it;
// the process-switch interrupt then brings the urgent one back, which allocates a
// VCB slot and blocks on it until the other sends a message whose reference is
// handed over. Also waits for one delay of 2 ticks. Mechanisms are counted as in
// the reduced-size end-to-end test.
module tb_rtu_top_full;
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

  rtu_top dut (
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

    rd(0, 8'h24, s);
    chk("tick divider reset value", s == 50);
    call(0, OP_CREATE, mk(100, 40, 3'b001), s);
    chk("create 100", sr_rc(s) == RC_OK);
    rd(0, sr_a(0), s);
    chk("process 100 starts", sr_pid(s) == 100);
    call(0, OP_CREATE, mk(127, 7, 3'b001), s);
    chk("create 127", sr_rc(s) == RC_OK);
    call(0, OP_SEM_CREATE, 24'd15, s);
    chk("semaphore 15", sr_rc(s) == RC_OK);
    svc(0, OP_SEM_PEND, 24'd15, s);
    chk("pend blocks", sr_rc(s) == RC_NOT_FREE && sr_blk(s));
    svc_end(0, s);
    chk("switch to 127", sr_pid(s) == 127);
    if (sr_pid(s) == 127) mech[M_SEM_BLOCK]++;
    call(0, OP_SEM_RELEASE, 24'd15, s);
    take_irq(0, s);
    chk("100 back", sr_pid(s) == 100);
    if (sr_pid(s) == 100) mech[M_SEM_WAKE]++;
    call(0, OP_VCB_ALLOC, {10'd0, 1'b0, 1'b1, 1'b1, 6'd40, 5'd31}, s);
    chk("slot 31", sr_rc(s) == RC_OK);
    svc(0, OP_VCB_GET, {2'd0, 16'd0, 1'b1, 5'd31}, s);
    chk("get blocks", sr_blk(s));
    svc_end(0, s);
    chk("switch to sender", sr_pid(s) == 127);
    call(0, OP_VCB_PUT, {16'd0, 1'b0, 2'd2, 5'd31}, s);
    chk("put", sr_rc(s) == RC_OK && sr_val(s) == 31 * 32);
    call(0, OP_VCB_PUT_RDY, 24'(31 * 32), s);
    take_irq(0, s);
    chk("reference handed over", sr_pid(s) == 100 && sr_val(s) == 31 * 32);
    if (sr_val(s) == 31 * 32) mech[M_VCB_HANDOVER]++;
    call(0, OP_TASK_INFO, 24'd100, s);
    chk("inherited priority kept at least default", sr_val(s) % 64 >= 40);
    svc(0, OP_DELAY, 24'd2, s);
    svc_end(0, s);
    take_irq(0, s);
    chk("delay over", sr_pid(s) == 100 && sr_rc(s) == RC_OK);
    if (sr_pid(s) == 100) mech[M_DELAY]++;
    rd(0, 8'h04, s);
    chk("time counter runs", s >= 2);

    for (int i = 0; i < M_COUNT; i++)
      if (i inside {M_SWITCH_IRQ, M_SEM_BLOCK, M_SEM_WAKE, M_VCB_HANDOVER, M_DELAY}) begin
        $display("mechanism %s happened %0d times", mech_e'(i), mech[i]);
        chk($sformatf("mechanism %s happened", mech_e'(i)), mech[i] > 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
