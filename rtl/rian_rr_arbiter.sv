// rian_rr_arbiter: round-robin arbiter of one router output (the control
// switch of the document's router).
//
// Several input ports may hold a control flit for the same output in one
// cycle; the document only says that arbitration is done to avoid resource
// hazards. This arbiter grants one of them, searching from the port after the
// one granted last, so that no input starves. Interface: req is one bit per
// input, enable lets a grant happen at all (the output is wired and not
// throttled), gnt is one-hot or zero. Purely combinational except for the
// priority pointer, which moves on the clock edge after each grant.
module rian_rr_arbiter #(
  parameter int unsigned N = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         enable,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;  // index granted most recently
  logic [IW-1:0] idx;

  always_comb begin
    gnt = '0;
    idx = last;
    if (enable) begin
      // Search N positions starting just after the last winner.
      for (int unsigned k = 1; k <= N; k++) begin
        idx = IW'((32'(last) + k) % N);
        if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last <= IW'(i);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("rian_rr_arbiter: more than one grant");
endmodule
