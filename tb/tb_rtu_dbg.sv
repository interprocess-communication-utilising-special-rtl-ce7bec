// tb_rtu_dbg -- self-checking test of the debug trace FIFO.
// Writes service, switch and interrupt records with random contents, reads them
// back through the pop port and compares each word with the record format; fills
// the FIFO past its depth and checks the overflow flag, that the oldest records
// survive, and that reading clears the flag.
module tb_rtu_dbg;
  import rtu_pkg::*;

  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] time_lo;
  logic svc_ev, sw_ev, irq_ev, rd, empty, overflow;
  cpu_t svc_cpu, sw_cpu;
  logic [7:0] svc_op, irq_bits;
  logic [3:0] svc_rc;
  pid_t sw_pid;
  logic [31:0] rdata;
  logic [31:0] exp_q [$];
  int checks = 0, failures = 0;

  rtu_dbg #(.DEPTH(D)) dut (.clk, .rst_n, .time_lo, .svc_ev, .svc_cpu, .svc_op, .svc_rc,
                            .sw_ev, .sw_cpu, .sw_pid, .irq_ev, .irq_bits, .rd, .empty,
                            .rdata, .overflow);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rdata=%h", what, rdata);
    end
  endtask

  task automatic put(int kind);
    logic [31:0] w;
    @(negedge clk);
    time_lo = 16'($urandom);
    svc_cpu = cpu_t'($urandom % 3);
    sw_cpu  = cpu_t'($urandom % 3);
    svc_op  = 8'($urandom);
    svc_rc  = 4'($urandom);
    sw_pid  = pid_t'($urandom);
    irq_bits = 8'($urandom);
    svc_ev = (kind == 0);
    sw_ev  = (kind == 1);
    irq_ev = (kind == 2);
    case (kind)
      0: w = {2'd0, svc_cpu, svc_op, svc_rc, time_lo};
      1: w = {2'd1, sw_cpu, sw_pid, 4'd0, time_lo};
      default: w = {2'd2, 2'd0, irq_bits, 4'd0, time_lo};
    endcase
    exp_q.push_back(w);
    @(negedge clk);
    svc_ev = 0;
    sw_ev = 0;
    irq_ev = 0;
  endtask

  task automatic get(string what);
    @(negedge clk);
    chk({what, " not empty"}, !empty);
    chk({what, " word"}, rdata == exp_q.pop_front());
    rd = 1'b1;
    @(negedge clk);
    rd = 1'b0;
  endtask

  initial begin
    {svc_ev, sw_ev, irq_ev, rd} = '0;
    time_lo = '0;
    svc_cpu = '0;
    sw_cpu = '0;
    svc_op = '0;
    svc_rc = '0;
    sw_pid = '0;
    irq_bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("empty after reset", empty && !overflow && rdata == 0);
    for (int k = 0; k < 20; k++) begin
      put(int'($urandom % 3));
      get("record");
    end
    chk("empty again", empty);
    for (int k = 0; k < D; k++) put(k % 3);
    chk("no overflow when exactly full", !overflow);
    put(0);
    void'(exp_q.pop_back());
    chk("overflow when full", overflow);
    get("oldest kept");
    chk("read clears overflow", !overflow);
    for (int k = 1; k < D; k++) get("drain");
    chk("empty after drain", empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
