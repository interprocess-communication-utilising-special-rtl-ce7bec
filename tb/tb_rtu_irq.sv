// tb_rtu_irq -- self-checking test of the external interrupt inputs.
// Raises each input for a random number of cycles and checks that exactly one
// event pulse comes out, three cycles after the rising edge (two synchroniser
// flops and the edge register), that an event nobody waits for is kept pending
// until consumed, and that an event a process waits for is not kept.
module tb_rtu_irq;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ext_irq, irq_waiting, consume, irq_event, pending;
  int checks = 0, failures = 0;

  rtu_irq #(.NIRQ(4)) dut (.clk, .rst_n, .ext_irq, .irq_waiting, .consume, .irq_event, .pending);

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
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    ext_irq = '0;
    irq_waiting = '0;
    consume = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      int n, first, len;
      int unsigned i;
      logic w;
      i = k % 4;
      len = 1 + int'($urandom % 10);
      w = $urandom % 2;
      @(negedge clk);
      irq_waiting[i] = w;
      ext_irq[i] = 1'b1;
      n = 0;
      first = -1;
      for (int c = 1; c <= len + 6; c++) begin
        @(negedge clk);
        if (c == len) ext_irq[i] = 1'b0;
        if (irq_event[i]) begin
          n++;
          if (first < 0) first = c;
        end
        chk("no event on other inputs", (irq_event & ~(4'b1 << i)) == '0);
      end
      chk("one event per edge", n == 1);
      chk("event latency 3 cycles", first == 3);
      chk("pending only when nobody waits", pending[i] == !w);
      @(negedge clk);
      consume[i] = 1'b1;
      @(negedge clk);
      consume[i] = 1'b0;
      chk("consume clears pending", pending[i] == 1'b0);
      irq_waiting[i] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
