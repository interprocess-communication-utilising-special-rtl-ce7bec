// tb_rtu_svc -- self-checking test of the service dispatcher.
// The dispatcher is connected to an 8-process table, as in the RTU, and driven
// with single service requests. Checks the process-management, time, interrupt
// and signal services against the state changes they must cause in the table,
// that semaphore, VCB and resource-queue services reach their units (and those
// units see the waiters found by the table's search ports), that a blocking
// service without a running caller is refused, and that unknown codes are
// rejected.
module tb_rtu_svc;
  import rtu_pkg::*;

  localparam int NP = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  svc_req_t req;
  tinfo_t tab [NP];
  qres_t q_res [2];
  wobj_t q_obj [2];
  logic [3:0] irq_pending, irq_consume, irq_waiting;
  logic act_valid;
  act_t act;
  int checks = 0, failures = 0;

  rtu_svc #(.NPROC(NP), .NIRQ(4), .NSEM(4), .SEM_MAX(4), .NSLOT(2), .DEPTH(4), .NRQ(4)) dut (
    .clk, .rst_n, .req, .tab, .q_res, .irq_pending, .q_obj, .act_valid, .act, .irq_consume);

  rtu_task_table #(.NPROC(NP), .NIRQ(4)) u_tab (
    .clk, .rst_n, .tick(1'b0), .irq_event(4'd0), .act_valid, .act, .sw_valid(1'b0),
    .sw_cpu(2'd0), .sw_new_valid(1'b0), .sw_new(8'd0), .q_obj, .q_res, .tab, .irq_waiting);

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
      $display("FAIL %s: rcode=%0d rval=%h block=%0d wake=%0d pm=%0d", what, act.rcode, act.rval,
               act.block, act.wake, act.pm);
    end
  endtask

  task automatic svc(svc_op_e op, logic [23:0] arg, int caller = 1, bit cv = 1);
    @(negedge clk);
    req = '0;
    req.valid = 1'b1;
    req.caller_valid = cv;
    req.caller = pid_t'(caller);
    req.op = op;
    req.arg = arg;
    #1;
  endtask

  task automatic idle();
    @(negedge clk);
    req = '0;
  endtask

  function automatic logic [23:0] mk(int pid, int prio, int init);
    return {5'd0, 3'b000, 2'(init), 6'(prio), 8'(pid)};
  endfunction

  initial begin
    req = '0;
    irq_pending = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    svc(OP_CREATE, mk(1, 10, 0), 0, 0);
    chk("create from start-up code", act.rcode == RC_OK && act.pm == PM_CREATE);
    svc(OP_CREATE, mk(2, 5, 0), 0, 0);
    svc(OP_CREATE, mk(3, 5, 2), 0, 0);
    svc(OP_CREATE, mk(4, 5, 1), 0, 0);
    idle();
    chk("created states", tab[1].st == T_READY && tab[3].st == T_SUSPENDED &&
        tab[4].st == T_BLOCKED);
    svc(OP_CREATE, mk(1, 3, 0));
    chk("create existing", act.rcode == RC_EXISTS && act.pm == PM_NONE);
    svc(OP_CREATE, mk(9, 3, 0));
    chk("create out of range", act.rcode == RC_NOT_OK);
    svc(OP_TASK_INFO, 24'd1);
    chk("task info", act.rval == {T_READY, 1'b0, 3'b111, 3'd0, 6'd10});
    svc(OP_SET_PRIO, {10'd0, 6'd20, 8'd2});
    idle();
    chk("set priority", tab[2].prio == 20 && tab[2].base == 20);
    svc(OP_RESUME, 24'd3);
    idle();
    chk("resume suspended", tab[3].st == T_READY);
    svc(OP_RESUME, 24'd4);
    idle();
    chk("resume created-blocked", tab[4].st == T_READY);
    svc(OP_RESUME, 24'd4);
    chk("resume of ready refused", act.rcode == RC_NOT_OK);
    svc(OP_SUSPEND, 24'd4);
    idle();
    chk("suspend", tab[4].st == T_SUSPENDED);
    svc(OP_TERMINATE, 24'd4);
    idle();
    chk("terminate", tab[4].st == T_DORMANT);
    svc(OP_TERMINATE, 24'd4);
    chk("terminate dormant", act.rcode == RC_NOT_CREATED);

    svc(OP_DELAY, 24'd0, 1);
    chk("delay 0 returns", act.rcode == RC_OK && !act.block);
    svc(OP_DELAY, 24'd7, 1);
    chk("delay blocks caller", act.rcode == RC_BLOCKED && act.block && act.bpid == 1 &&
        act.btmo == 7);
    idle();
    chk("delay in table", tab[1].st == T_BLOCKED && tab[1].wobj.kind == W_DELAY);
    svc(OP_DELAY, 24'd7, 0, 0);
    chk("blocking without caller refused", act.rcode == RC_NOT_OK && !act.block);

    svc(OP_SIG_RECV, 24'd0, 2);
    chk("signal receive blocks", act.block && act.bobj == mk_obj(W_SIGNAL, 8'd2));
    idle();
    svc(OP_SIG_SEND, 24'd2, 3);
    chk("search port set for signal", q_obj[0] == mk_obj(W_SIGNAL, 8'd2));
    chk("signal send wakes", act.wake && act.wpid == 2 && act.rval == 1);
    idle();
    chk("receiver ready", tab[2].st == T_READY);
    svc(OP_SIG_SEND, 24'd2, 3);
    chk("signal to a process not waiting", !act.wake && act.rval == 0);

    irq_pending = 4'b0100;
    svc(OP_WAIT_IRQ, 24'd2, 3);
    chk("pending interrupt consumed", act.rcode == RC_OK && irq_consume == 4'b0100 &&
        act.pm == PM_NONE);
    irq_pending = 4'b0000;
    svc(OP_WAIT_IRQ, 24'd1, 3);
    chk("wait for interrupt", act.rcode == RC_BLOCKED && act.pm == PM_WAIT_IRQ);
    idle();
    chk("interrupt process waiting", tab[3].st == T_WAIT_IRQ && irq_waiting == 4'b0010);

    svc(OP_SET_PERIOD, 24'd5, 2);
    chk("set period", act.pm == PM_SET_PERIOD && act.pm_pid == 2);
    svc(OP_WAIT_PERIOD, 24'd0, 2);
    chk("wait period blocks", act.block && act.bobj.kind == W_PERIOD);
    idle();

    // the units behind the dispatcher
    svc(OP_SEM_CREATE, {15'd0, 5'd0, 4'd1});
    chk("semaphore unit", act.rcode == RC_OK);
    svc(OP_SEM_PEND, 24'd1, 5, 1);
    chk("semaphore pend blocks", act.block && act.bobj == mk_obj(W_SEM, 8'd1));
    idle();
    svc(OP_SEM_RELEASE, 24'd1, 6);
    chk("waiter found through the table", act.wake && act.wpid == 5);
    svc(OP_VCB_ALLOC, {10'd0, 1'b0, 1'b0, 1'b0, 6'd1, 5'd1});
    chk("vcb unit", act.rcode == RC_OK);
    svc(OP_VCB_ALLOC, {10'd0, 1'b0, 1'b0, 1'b0, 6'd1, 5'd1});
    chk("vcb unit state", act.rcode == RC_EXISTS);
    svc(OP_RQ_CREATE, {6'd0, 1'b0, 1'b0, 8'd0, 8'd3});
    chk("resource queue unit", act.rcode == RC_OK && act.rval == 0);
    svc(OP_RQ_READ, {14'd0, 2'd0, 8'd0});
    chk("resource queue max", act.rval == 3);
    svc(svc_op_e'(8'h7F), 24'd0);
    chk("unknown operation", act.rcode == RC_NOT_OK);
    idle();
    chk("idle request has no effect", !act_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
