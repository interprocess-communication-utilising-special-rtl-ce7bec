// tb_rtu_sem -- self-checking test of the counting semaphore unit.
// Drives single service requests, plays the process table's waiter search (q0) by
// hand, and checks return codes, counter values, blocking and wake-up actions
// against values worked out by hand from the semaphore rules.
module tb_rtu_sem;
  import rtu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  svc_req_t req;
  qres_t    q0;
  act_t     act;
  int checks = 0, failures = 0;

  rtu_sem #(.NSEM(16), .SEM_MAX(16)) dut (.clk, .rst_n, .req, .q0, .act);

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
      $display("FAIL %s: rcode=%0d rval=%0d block=%0d wake=%0d", what, act.rcode, act.rval, act.block, act.wake);
    end
  endtask

  // apply one service, look at the combinational answer, then clock it in
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

  initial begin
    req = '0;
    q0  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    svc(OP_SEM_CREATE, {15'd0, 5'd2, 4'd3});
    chk("create", act.rcode == RC_OK && act.rval == 2);
    svc(OP_SEM_CREATE, {15'd0, 5'd1, 4'd3});
    chk("create twice", act.rcode == RC_NOT_OK);
    svc(OP_SEM_CREATE, {15'd0, 5'd17, 4'd4});
    chk("create above max", act.rcode == RC_NOT_OK);
    svc(OP_SEM_PEND, 24'd3);
    chk("pend 2->1", act.rcode == RC_OK && act.rval == 1 && !act.block);
    svc(OP_SEM_PEND, 24'd3);
    chk("pend 1->0", act.rcode == RC_OK && act.rval == 0);
    svc(OP_SEM_PEND, 24'd3, 8'd9);
    chk("pend busy blocks", act.rcode == RC_NOT_FREE && act.block && act.bpid == 9 &&
        act.bobj == mk_obj(W_SEM, 8'd3) && act.btmo == 0);
    // one process waits: release hands the unit over
    q0.found = 1'b1; q0.fifo_pid = 8'd9; q0.prio_pid = 8'd11;
    svc(OP_SEM_RELEASE, 24'd3);
    chk("release wakes FIFO first", act.rcode == RC_OK && act.wake && act.wpid == 9 &&
        act.wcode == RC_OK && act.rval == 0);
    svc(OP_SEM_DELETE, 24'd3);
    chk("delete with waiters", act.rcode == RC_WAITING);
    idle();
    q0 = '0;
    svc(OP_SEM_READ, 24'd3);
    chk("count stays 0 after hand-over", act.rval == 16'h100);
    for (int k = 1; k <= 16; k++) begin
      svc(OP_SEM_RELEASE, 24'd3);
      chk("release increments", act.rcode == RC_OK && act.rval == 16'(k) && !act.wake);
    end
    svc(OP_SEM_RELEASE, 24'd3);
    chk("max value", act.rcode == RC_MAX_VALUE && act.rval == 16);
    svc(OP_SEM_READ, 24'd3);
    chk("read", act.rcode == RC_OK && act.rval == 16'h110);
    svc(OP_SEM_DELETE, 24'd3);
    chk("delete", act.rcode == RC_OK);
    svc(OP_SEM_PEND, 24'd3);
    chk("pend deleted", act.rcode == RC_NOT_CREATED && !act.block);
    svc(OP_SEM_RELEASE, 24'd7);
    chk("release never created", act.rcode == RC_NOT_CREATED);
    svc(OP_SEM_READ, 24'd3);
    chk("read deleted", act.rval[8] == 1'b0);
    // a request that is not valid changes nothing
    @(negedge clk);
    req = '0; req.op = OP_SEM_CREATE; req.arg = {15'd0, 5'd4, 4'd3};
    svc(OP_SEM_READ, 24'd3);
    chk("invalid request ignored", act.rval[8] == 1'b0);
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
