// tb_rtu_vcb -- self-checking test of the Virtual Communication Bus unit.
// Runs a small configuration (4 slots of 4 places) through the message life
// cycle: allocate, put / put_ready, get / get_ready, priority and FIFO receive
// order, the place reserved for the most urgent message, blocking senders and
// receivers, hand-over of a message to a waiting receiver, owner checks, the
// priority-inheritance actions taken from the pinc table, close/open, flush,
// deallocate and init. Expected values are worked out by hand from those rules.
module tb_rtu_vcb;
  import rtu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  svc_req_t req;
  qres_t    q0, q1;
  act_t     act;
  int checks = 0, failures = 0;

  rtu_vcb #(.NSLOT(4), .DEPTH(4)) dut (.clk, .rst_n, .req, .q0, .q1, .act);

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
      $display("FAIL %s: rcode=%0d rval=%0d block=%0d wake=%0d wpid=%0d wval=%0d pop=%0d pprio=%0d",
               what, act.rcode, act.rval, act.block, act.wake, act.wpid, act.wval, act.pop, act.pprio);
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

  function automatic logic [23:0] put_a(int slot, int mp, int w, int tmo);
    return {16'(tmo), 1'(w), 2'(mp), 5'(slot)};
  endfunction

  function automatic logic [23:0] get_a(int slot, int w, int tmo);
    return {2'd0, 16'(tmo), 1'(w), 5'(slot)};
  endfunction

  initial begin
    req = '0;
    q0 = '0;
    q1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // slot 1: default priority 2, priority order, inheritance, owner check, owner 5
    svc(OP_VCB_ALLOC, {10'd0, 1'b1, 1'b1, 1'b1, 6'd2, 5'd1});
    chk("allocate", act.rcode == RC_OK);
    svc(OP_VCB_ALLOC, {10'd0, 1'b1, 1'b1, 1'b1, 6'd2, 5'd1}, 8'd6);
    chk("allocate twice", act.rcode == RC_EXISTS);
    svc(OP_VCB_GET, get_a(0, 0, 0));
    chk("unallocated slot", act.rcode == RC_NOT_CREATED);
    svc(OP_VCB_PUT, put_a(1, 0, 0, 0), 8'd6);
    chk("put gives reference", act.rcode == RC_OK && act.rval == 32);
    svc(OP_VCB_PUT_RDY, 24'd32, 8'd6);
    chk("put_ready raises owner to pinc[0]", act.rcode == RC_OK && act.pop == P_RAISE &&
        act.ppid == 5 && act.pprio == 3);
    svc(OP_VCB_PUT, put_a(1, 2, 0, 0), 8'd6);
    chk("second place", act.rval == 33);
    svc(OP_VCB_PUT, put_a(1, 1, 0, 0), 8'd6);
    chk("third place", act.rval == 34);
    svc(OP_VCB_PUT_RDY, 24'd33, 8'd6);
    chk("put_ready prio 2 raises to pinc[2]", act.pprio == 4);
    svc(OP_VCB_PUT_RDY, 24'd34, 8'd6);
    chk("put_ready", act.rcode == RC_OK);
    svc(OP_VCB_PUT_RDY, 24'd34, 8'd6);
    chk("put_ready twice", act.rcode == RC_WRONG_BUF);
    svc(OP_VCB_PUT, put_a(1, 1, 0, 0), 8'd6);
    chk("last place reserved", act.rcode == RC_FULL);
    svc(OP_VCB_PUT, put_a(1, 1, 1, 12), 8'd6);
    chk("sender blocks", act.rcode == RC_BLOCKED && act.block && act.bpid == 6 &&
        act.bobj == mk_obj(W_VCB_PUT, 8'd1) && act.btmo == 12);
    svc(OP_VCB_PUT, put_a(1, 3, 0, 0), 8'd6);
    chk("urgent message takes last place", act.rcode == RC_OK && act.rval == 35);
    svc(OP_VCB_PUT, put_a(1, 3, 0, 0), 8'd6);
    chk("full", act.rcode == RC_FULL);
    svc(OP_VCB_INFO, 24'd1);
    chk("info", act.rval == {1'b1, 1'b1, 1'b1, 1'b1, 6'd2, 6'd4});
    svc(OP_VCB_GET, get_a(1, 0, 0), 8'd6);
    chk("owner check", act.rcode == RC_NOT_OWNER);
    svc(OP_VCB_GET, get_a(1, 0, 0));
    chk("get most urgent first", act.rcode == RC_OK && act.rval == 33);
    idle();
    q1 = '{found: 1'b1, fifo_pid: 8'd8, fifo_prio: 6'd1, prio_pid: 8'd8, prio_prio: 6'd1};
    svc(OP_VCB_GET_RDY, 24'd33);
    chk("get_ready counts ready left", act.rcode == RC_OK && act.rval == 2);
    chk("get_ready releases sender", act.wake && act.wpid == 8);
    chk("owner priority follows remaining messages", act.pop == P_SET && act.ppid == 5 &&
        act.pprio == 3);
    idle();
    q1 = '0;
    svc(OP_VCB_GET_RDY, 24'd33);
    chk("get_ready twice", act.rcode == RC_WRONG_BUF);
    svc(OP_VCB_GET, get_a(1, 0, 0));
    chk("then prio 1", act.rval == 34);
    svc(OP_VCB_GET, get_a(1, 0, 0));
    chk("then prio 0", act.rval == 32);
    svc(OP_VCB_GET, get_a(1, 0, 0));
    chk("empty", act.rcode == RC_EMPTY && !act.block);
    svc(OP_VCB_GET, get_a(1, 1, 7));
    chk("receiver blocks", act.rcode == RC_BLOCKED && act.bobj == mk_obj(W_VCB_GET, 8'd1) &&
        act.btmo == 7);
    idle();
    q0 = '{found: 1'b1, fifo_pid: 8'd9, fifo_prio: 6'd1, prio_pid: 8'd9, prio_prio: 6'd1};
    svc(OP_VCB_PUT_RDY, 24'd35, 8'd6);
    chk("message handed to waiting receiver", act.wake && act.wpid == 9 && act.wval == 35);
    idle();
    q0 = '0;
    svc(OP_VCB_GET, get_a(1, 0, 0));
    chk("handed message not offered again", act.rcode == RC_EMPTY);
    svc(OP_VCB_CLOSE, 24'd1);
    chk("close counts unfinished messages", act.rcode == RC_OK && act.rval == 3);
    svc(OP_VCB_PUT, put_a(1, 3, 0, 0), 8'd6);
    chk("closed", act.rcode == RC_CLOSED);
    svc(OP_VCB_OPEN, 24'd1);
    chk("open", act.rcode == RC_OK);
    svc(OP_VCB_SET_PINC, {16'd0, 6'd10, 2'd3});
    svc(OP_VCB_PUT, put_a(1, 3, 0, 0), 8'd6);
    chk("freed place reused", act.rval == 33);
    svc(OP_VCB_PUT_RDY, 24'd33, 8'd6);
    chk("new pinc entry used", act.pprio == 10);
    // slot 2: FIFO order, no inheritance, owner 7
    svc(OP_VCB_ALLOC, {10'd0, 1'b0, 1'b0, 1'b0, 6'd1, 5'd2}, 8'd7);
    svc(OP_VCB_PUT, put_a(2, 3, 0, 0), 8'd6);
    chk("slot 2 place 0", act.rval == 64);
    svc(OP_VCB_PUT, put_a(2, 0, 0, 0), 8'd6);
    chk("slot 2 place 1", act.rval == 65);
    svc(OP_VCB_PUT_RDY, 24'd65, 8'd6);
    chk("no inheritance", act.pop == P_NONE);
    svc(OP_VCB_PUT_RDY, 24'd64, 8'd6);
    svc(OP_VCB_GET, get_a(2, 0, 0), 8'd3);
    chk("FIFO slot gives oldest ready", act.rval == 65);
    svc(OP_VCB_FLUSH, 24'd2, 8'd3);
    chk("flush owner only", act.rcode == RC_NOT_OWNER);
    svc(OP_VCB_FLUSH, 24'd2, 8'd7);
    chk("flush releases senders", act.bcast && act.bc0 == mk_obj(W_VCB_PUT, 8'd2));
    svc(OP_VCB_INFO, 24'd2);
    chk("flush empties", act.rval[5:0] == 0 && act.rval[15] == 1'b1);
    svc(OP_VCB_DEALLOC, 24'd1, 8'd6);
    chk("deallocate owner only", act.rcode == RC_NOT_OWNER);
    svc(OP_VCB_DEALLOC, 24'd1);
    chk("deallocate releases all", act.bcast && act.bc0 == mk_obj(W_VCB_GET, 8'd1) &&
        act.bc1 == mk_obj(W_VCB_PUT, 8'd1));
    svc(OP_VCB_INFO, 24'd1);
    chk("deallocated", act.rcode == RC_NOT_CREATED);
    svc(OP_VCB_INIT, 24'd0);
    svc(OP_VCB_INFO, 24'd2);
    chk("init frees all", act.rcode == RC_NOT_CREATED);
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
