// rr_arbiter -- round-robin arbiter for the shared bus of the application CPUs.
//
// N masters request the bus with req; at most one gnt bit is high. A master keeps
// the bus for as long as it holds its request; when it lets go, the next requesting
// master after it in circular order gets the bus in the following cycle. Round
// robin is used (rather than fixed priority) because it bounds every master's
// wait: at most N-1 other tenures, which is what the document's bus time model
// assumes. Grant is registered: one cycle from request to grant.
// Lint note: the rotated index m is computed 32 bits wide; only its low bits
// address the request vector.
module rr_arbiter #(
  parameter int unsigned N = 3   // document: up to three application processors
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // master granted most recently
  logic [N-1:0]  gnt_n;
  logic [IW-1:0] last_n;

  always_comb begin
    int unsigned m;
    m      = 0;
    gnt_n  = '0;
    last_n = last;
    if ((gnt & req) != '0) begin
      gnt_n = gnt;                      // current owner keeps the bus
    end else begin
      for (int k = N; k >= 1; k--) begin
        m = (32'(last) + 32'(k)) % N;
        if (req[m]) begin
          gnt_n  = '0;
          gnt_n[m] = 1'b1;
          last_n = IW'(m);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(N - 1);
    end else begin
      gnt  <= gnt_n;
      last <= last_n;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_granted_req: assert property (@(posedge clk) disable iff (!rst_n)
                                  (gnt != '0) |-> ((gnt & $past(req)) != '0));

endmodule
