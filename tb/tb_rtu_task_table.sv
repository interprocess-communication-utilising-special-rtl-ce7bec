// tb_rtu_task_table -- self-checking test of the process table.
// Applies action records, ticks, interrupt events and process switches to an
// 8-process table and checks the resulting states, priorities, wake codes, the
// FIFO and priority waiter searches, timeouts, delays, periods, interrupt waits,
// priority raise/restore and broadcast release and kill, against the state
// transitions worked out by hand.
module tb_rtu_task_table;
  import rtu_pkg::*;

  localparam int NP = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick, act_valid, sw_valid, sw_new_valid;
  logic [3:0] irq_event, irq_waiting;
  act_t act;
  cpu_t sw_cpu;
  pid_t sw_new;
  wobj_t q_obj [2];
  qres_t q_res [2];
  tinfo_t tab [NP];
  int checks = 0, failures = 0;

  rtu_task_table #(.NPROC(NP), .NIRQ(4)) dut (
    .clk, .rst_n, .tick, .irq_event, .act_valid, .act, .sw_valid, .sw_cpu, .sw_new_valid,
    .sw_new, .q_obj, .q_res, .tab, .irq_waiting);

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
      $display("FAIL %s", what);
      for (int i = 0; i < NP; i++)
        $display("  pid %0d st=%0d prio=%0d base=%0d wobj=%h tmo=%0d wcode=%0d wval=%0d ppend=%0d",
                 i, tab[i].st, tab[i].prio, tab[i].base, tab[i].wobj, tab[i].tmo, tab[i].wcode,
                 tab[i].wval, tab[i].ppend);
    end
  endtask

  task automatic apply(act_t a);
    @(negedge clk);
    act = a;
    act_valid = 1'b1;
    @(negedge clk);
    act = '0;
    act_valid = 1'b0;
  endtask

  task automatic ticks(int n);
    repeat (n) begin
      @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
    end
  endtask

  function automatic act_t pm(pm_op_e op, int pid, logic [23:0] arg = '0);
    act_t a;
    a = '0;
    a.pm = op;
    a.pm_pid = pid_t'(pid);
    a.pm_arg = arg;
    return a;
  endfunction

  function automatic act_t blk(int pid, wobj_t o, int tmo);
    act_t a;
    a = '0;
    a.block = 1'b1;
    a.bpid = pid_t'(pid);
    a.bobj = o;
    a.btmo = 16'(tmo);
    return a;
  endfunction

  initial begin
    act_t a;
    {tick, act_valid, sw_valid, sw_new_valid} = '0;
    irq_event = '0;
    act = '0;
    sw_cpu = '0;
    sw_new = '0;
    q_obj[0] = mk_obj(W_SEM, 8'd3);
    q_obj[1] = mk_obj(W_RQ_TAKE, 8'd1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("all dormant after reset", tab[1].st == T_DORMANT && tab[7].st == T_DORMANT);

    apply(pm(PM_CREATE, 1, {5'd0, 3'b000, 2'd0, 6'd10, 8'd1}));
    apply(pm(PM_CREATE, 2, {5'd0, 3'b001, 2'd0, 6'd5, 8'd2}));
    apply(pm(PM_CREATE, 3, {5'd0, 3'b000, 2'd0, 6'd5, 8'd3}));
    apply(pm(PM_CREATE, 4, {5'd0, 3'b000, 2'd2, 6'd5, 8'd4}));
    chk("create ready", tab[1].st == T_READY && tab[1].prio == 10 && tab[1].base == 10 &&
        tab[1].aff == 3'b111);
    chk("create with mask", tab[2].aff == 3'b001);
    chk("create suspended", tab[4].st == T_SUSPENDED);

    @(negedge clk);
    sw_valid = 1'b1;
    sw_cpu = 2'd0;
    sw_new_valid = 1'b1;
    sw_new = 8'd1;
    @(negedge clk);
    sw_valid = 1'b0;
    sw_new_valid = 1'b0;
    chk("switch in", tab[1].st == T_RUNNING && tab[1].cpu == 0);

    apply(blk(1, mk_obj(W_SEM, 8'd3), 0));
    apply(blk(2, mk_obj(W_SEM, 8'd3), 0));
    apply(blk(3, mk_obj(W_SEM, 8'd3), 0));
    chk("blocked", tab[1].st == T_BLOCKED && tab[3].wobj == mk_obj(W_SEM, 8'd3));
    chk("fifo search", q_res[0].found && q_res[0].fifo_pid == 1);
    chk("priority search", q_res[0].prio_pid == 1 && q_res[0].prio_prio == 10);
    chk("other object empty", !q_res[1].found);
    a = '0;
    a.pop = P_SET;
    a.ppid = 8'd3;
    a.pprio = 6'd20;
    apply(a);
    chk("priority search follows priority", q_res[0].prio_pid == 3 && q_res[0].prio_prio == 20);
    a = '0;
    a.wake = 1'b1;
    a.wpid = 8'd1;
    a.wcode = RC_OK;
    a.wval = 16'd77;
    apply(a);
    chk("wake with value", tab[1].st == T_READY && tab[1].wcode == RC_OK && tab[1].wval == 77);
    chk("fifo search next", q_res[0].fifo_pid == 2);
    a = '0;
    a.bcast = 1'b1;
    a.bc0 = mk_obj(W_SEM, 8'd3);
    a.bc1 = mk_obj(W_SEM, 8'd3);
    apply(a);
    chk("broadcast release", tab[2].st == T_READY && tab[3].st == T_READY &&
        tab[2].wcode == RC_FLUSHED && !q_res[0].found);

    apply(blk(2, mk_obj(W_DELAY, 8'd0), 3));
    apply(blk(3, mk_obj(W_RQ_TAKE, 8'd1), 2));
    chk("second search port", q_res[1].found && q_res[1].fifo_pid == 3);
    ticks(2);
    chk("timeout", tab[3].st == T_READY && tab[3].wcode == RC_TIMEOUT);
    chk("delay still running", tab[2].st == T_BLOCKED && tab[2].tmo == 1);
    ticks(1);
    chk("delay done", tab[2].st == T_READY && tab[2].wcode == RC_OK);

    apply(pm(PM_SET_PERIOD, 2, 24'd4));
    ticks(4);
    chk("period elapsed while busy", tab[2].ppend == 1'b1);
    apply(pm(PM_CLR_PPEND, 2));
    chk("pending period cleared", tab[2].ppend == 1'b0);
    apply(blk(2, mk_obj(W_PERIOD, 8'd0), 0));
    ticks(3);
    chk("waits for period", tab[2].st == T_BLOCKED);
    ticks(1);
    chk("period start", tab[2].st == T_READY && tab[2].ppend == 1'b0);

    apply(pm(PM_WAIT_IRQ, 3, 24'd2));
    chk("waits for interrupt", tab[3].st == T_WAIT_IRQ && irq_waiting == 4'b0100);
    @(negedge clk);
    irq_event = 4'b0010;
    @(negedge clk);
    irq_event = 4'b0000;
    chk("other interrupt ignored", tab[3].st == T_WAIT_IRQ);
    @(negedge clk);
    irq_event = 4'b0100;
    @(negedge clk);
    irq_event = 4'b0000;
    chk("interrupt releases", tab[3].st == T_READY && irq_waiting == 0);

    a = '0;
    a.pop = P_RAISE;
    a.ppid = 8'd1;
    a.pprio = 6'd30;
    apply(a);
    chk("raise", tab[1].prio == 30 && tab[1].base == 10);
    a.pprio = 6'd4;
    apply(a);
    chk("raise never lowers", tab[1].prio == 30);
    a.pop = P_RESTORE;
    apply(a);
    chk("restore", tab[1].prio == 10);
    apply(pm(PM_SET_PRIO, 1, {10'd0, 6'd12, 8'd1}));
    chk("set priority", tab[1].prio == 12 && tab[1].base == 12);
    apply(pm(PM_SUSPEND, 1));
    chk("suspend", tab[1].st == T_SUSPENDED);
    apply(pm(PM_RESUME, 1));
    chk("resume", tab[1].st == T_READY);

    apply(blk(1, mk_obj(W_VCB_GET, 8'd5), 0));
    apply(blk(2, mk_obj(W_VCB_PUT, 8'd5), 0));
    a = '0;
    a.bcast = 1'b1;
    a.bkill = 1'b1;
    a.bc0 = mk_obj(W_VCB_GET, 8'd5);
    a.bc1 = mk_obj(W_VCB_PUT, 8'd5);
    apply(a);
    chk("broadcast kill", tab[1].st == T_DORMANT && tab[2].st == T_DORMANT);
    apply(pm(PM_TERMINATE, 3));
    chk("terminate", tab[3].st == T_DORMANT);

    // switch out with no successor
    apply(pm(PM_CREATE, 5, {5'd0, 3'b000, 2'd0, 6'd1, 8'd5}));
    @(negedge clk);
    sw_valid = 1'b1;
    sw_cpu = 2'd2;
    sw_new_valid = 1'b1;
    sw_new = 8'd5;
    @(negedge clk);
    sw_new_valid = 1'b0;
    @(negedge clk);
    sw_valid = 1'b0;
    chk("switch out", tab[5].st == T_READY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
