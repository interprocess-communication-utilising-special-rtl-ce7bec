// tb_rr_arbiter -- self-checking test of the shared-bus arbiter.
// Drives random request patterns and compares the grant each cycle with a
// reference model written from the rules: at most one grant, only to a requester,
// the owner keeps the bus while it requests, and a free bus goes to the first
// requester after the last owner in circular order. Also checks that with all
// three masters requesting one cycle each the grants rotate 0,1,2.
module tb_rr_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] req, gnt, m_gnt;
  int m_last;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(3)) dut (.clk, .rst_n, .req, .gnt);

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
      $display("FAIL %s: req=%b gnt=%b model=%b", what, req, gnt, m_gnt);
    end
  endtask

  // reference model, updated at each clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      if ((m_gnt & req) == 0) begin
        logic [2:0] g;
        g = '0;
        for (int k = 1; k <= 3; k++)
          if (g == 0 && req[(m_last + k) % 3]) begin
            g[(m_last + k) % 3] = 1'b1;
            m_last = (m_last + k) % 3;
          end
        m_gnt <= g;
      end
    end
  end

  initial begin
    int order [$];
    req = '0;
    m_gnt = '0;
    m_last = 2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      chk("grant matches model", gnt == m_gnt);
      chk("one-hot", $onehot0(gnt));
      req = 3'($urandom);
    end
    // rotation: everyone requests, the owner drops its request after one grant
    @(negedge clk);
    req = 3'b000;
    @(negedge clk);
    req = 3'b111;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      if (gnt != 0) begin
        for (int i = 0; i < 3; i++) if (gnt[i]) order.push_back(i);
        req = 3'b111 & ~gnt;
      end else begin
        req = 3'b111;
      end
    end
    chk("enough grants", order.size() >= 6);
    for (int i = 1; i < order.size(); i++)
      chk("rotation", order[i] == (order[i-1] + 1) % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
