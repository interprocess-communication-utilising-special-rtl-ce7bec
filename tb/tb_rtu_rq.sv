// tb_rtu_rq -- self-checking test of the resource-queue unit.
// Drives single service requests, plays the process table (waiting takers q0,
// waiting givers q1, the target of a kill) by hand, and checks return codes,
// counts, blocking, hand-over to waiters in FIFO and priority order, priority
// inheritance actions, flush/delete broadcasts and id allocation, against values
// worked out by hand from the rules of counting semaphores and message queues.
module tb_rtu_rq;
  import rtu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  svc_req_t req;
  qres_t    q0, q1;
  tinfo_t   tgt;
  prio_t    caller_prio;
  act_t     act;
  int checks = 0, failures = 0;

  rtu_rq #(.NRQ(16)) dut (.clk, .rst_n, .req, .q0, .q1, .tgt, .caller_prio, .act);

  always #5 clk = ~clk;

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
      $display("FAIL %s: rcode=%0d rval=%0d block=%0d wake=%0d wpid=%0d pop=%0d",
               what, act.rcode, act.rval, act.block, act.wake, act.wpid, act.pop);
    end
  endtask

  task automatic svc(svc_op_e op, logic [23:0] arg, pid_t caller = 8'd5);
    @(negedge clk);
    req = '0;
    req.valid = 1'b1;
    req.caller_valid = 1'b1;
    req.caller = caller;
    req.op = op;
    req.arg = arg;
    #1;
  endtask

  task automatic idle();
    @(negedge clk);
    req = '0;
  endtask

  function automatic logic [23:0] ta(int id, int mode, int tmo);
    return {14'(tmo), 2'(mode), 8'(id)};
  endfunction

  initial begin
    req = '0;
    q0 = '0;
    q1 = '0;
    tgt = '0;
    caller_prio = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b1, 8'd1, 8'd2});   // max 2, init 1, inheritance
    chk("create gives id 0", act.rcode == RC_OK && act.rval == 0);
    svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b0, 8'd3, 8'd1});
    chk("init above max refused", act.rcode == RC_NOT_OK);
    svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b0, 8'd0, 8'd1});
    chk("second create gives id 1", act.rcode == RC_OK && act.rval == 1);
    svc(OP_RQ_TAKE, ta(0, 0, 0), 8'd5);
    chk("take decrements", act.rcode == RC_OK && act.rval == 0 && !act.block);
    svc(OP_RQ_TAKE, ta(0, 0, 0), 8'd6);
    chk("take without wait when empty", act.rcode == RC_NOT_FREE && !act.block);
    caller_prio = 6'd20;
    svc(OP_RQ_TAKE, ta(0, 1, 0), 8'd7);
    chk("take blocks", act.rcode == RC_BLOCKED && act.block && act.bpid == 7 &&
        act.bobj == mk_obj(W_RQ_TAKE, 8'd0) && act.btmo == 0);
    chk("owner inherits priority", act.pop == P_RAISE && act.ppid == 5 && act.pprio == 20);
    svc(OP_RQ_TAKE, ta(0, 2, 0), 8'd8);
    chk("zero timeout does not block", act.rcode == RC_NOT_FREE && !act.block);
    svc(OP_RQ_TAKE, ta(0, 2, 9), 8'd8);
    chk("timed block", act.block && act.btmo == 9);
    idle();
    q0 = '{found: 1'b1, fifo_pid: 8'd7, fifo_prio: 6'd20, prio_pid: 8'd9, prio_prio: 6'd30};
    svc(OP_RQ_GIVE, ta(0, 0, 0), 8'd5);
    chk("give hands unit to first taker", act.rcode == RC_OK && act.wake && act.wpid == 7 &&
        act.wcode == RC_OK);
    chk("owner back to base priority", act.pop == P_RESTORE && act.ppid == 5);
    idle();
    q0 = '0;
    svc(OP_RQ_READ, ta(0, 1, 0));
    chk("count unchanged by hand-over", act.rval == 0);
    svc(OP_RQ_GIVE, ta(0, 0, 0), 8'd7);
    chk("give increments", act.rcode == RC_OK && act.rval == 1 && !act.wake);
    svc(OP_RQ_GIVE, ta(0, 0, 0), 8'd7);
    chk("give to max", act.rcode == RC_OK && act.rval == 2);
    svc(OP_RQ_GIVE, ta(0, 0, 0), 8'd7);
    chk("give when full", act.rcode == RC_FULL && !act.block);
    svc(OP_RQ_GIVE, ta(0, 1, 0), 8'd7);
    chk("give blocks when full", act.rcode == RC_BLOCKED && act.bobj == mk_obj(W_RQ_GIVE, 8'd0));
    idle();
    q1 = '{found: 1'b1, fifo_pid: 8'd11, fifo_prio: 6'd1, prio_pid: 8'd12, prio_prio: 6'd2};
    svc(OP_RQ_TAKE, ta(0, 0, 0), 8'd5);
    chk("take releases first giver", act.rcode == RC_OK && act.wake && act.wpid == 11);
    idle();
    q1 = '0;
    svc(OP_RQ_READ, ta(0, 1, 0));
    chk("count kept at max after giver release", act.rval == 2);
    svc(OP_RQ_READ, ta(0, 0, 0));
    chk("read max", act.rval == 2);
    idle();
    tgt = '0;
    tgt.st = T_BLOCKED;
    tgt.wobj = mk_obj(W_RQ_TAKE, 8'd0);
    svc(OP_RQ_KILL, {7'd0, 1'b1, 8'd12, 8'd0});
    chk("kill terminates waiter", act.rcode == RC_OK && act.pm == PM_TERMINATE && act.pm_pid == 12);
    svc(OP_RQ_KILL, {7'd0, 1'b0, 8'd12, 8'd0});
    chk("kill releases waiter", act.wake && act.wpid == 12 && act.wcode == RC_FLUSHED);
    idle();
    tgt.wobj = mk_obj(W_RQ_TAKE, 8'd1);
    svc(OP_RQ_KILL, {7'd0, 1'b0, 8'd12, 8'd0});
    chk("kill of a process not waiting here", act.rcode == RC_NOT_OK && !act.wake);
    svc(OP_RQ_FLUSH, {15'd0, 1'b0, 8'd0});
    chk("flush broadcasts", act.bcast && act.bc0 == mk_obj(W_RQ_TAKE, 8'd0) &&
        act.bc1 == mk_obj(W_RQ_GIVE, 8'd0) && !act.bkill);
    svc(OP_RQ_READ, ta(0, 2, 0));
    chk("still created after flush", act.rval[0] == 1'b1);
    svc(OP_RQ_DELETE, {15'd0, 1'b1, 8'd0});
    chk("delete with kill", act.bcast && act.bkill);
    svc(OP_RQ_TAKE, ta(0, 0, 0));
    chk("deleted", act.rcode == RC_NOT_CREATED);
    svc(OP_RQ_TAKE, ta(200, 0, 0));
    chk("id out of range", act.rcode == RC_NOT_CREATED);
    svc(OP_RQ_CREATE, {6'd0, 1'b1, 1'b0, 8'd0, 8'd1});  // priority order
    chk("free id reused", act.rcode == RC_OK && act.rval == 0);
    idle();
    q0 = '{found: 1'b1, fifo_pid: 8'd3, fifo_prio: 6'd1, prio_pid: 8'd4, prio_prio: 6'd9};
    svc(OP_RQ_GIVE, ta(0, 0, 0));
    chk("priority order releases most urgent", act.wake && act.wpid == 4);
    idle();
    q0 = '0;
    for (int k = 2; k < 16; k++) begin
      svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b0, 8'd0, 8'd1});
      chk("fill ids", act.rcode == RC_OK && act.rval == k);
    end
    svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b0, 8'd0, 8'd1});
    chk("no free id", act.rcode == RC_NOT_OK);
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
