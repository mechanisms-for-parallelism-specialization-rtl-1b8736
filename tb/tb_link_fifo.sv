// tb_link_fifo: a credit-respecting sender pushes random tokens into the
// buffer while the consumer pops at random; the test checks that tokens come
// out in order and unchanged, that one credit returns per pop, that a pushed
// token is visible at the head one cycle later, and that with DEPTH credits
// the sender fills the buffer exactly to DEPTH entries.
module tb_link_fifo;
  import dyser_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t in, head;
  logic  pop, credit;
  int checks = 0, failures = 0;
  int credits = DEPTH, n_credit = 0, n_pop = 0, max_occ = 0, occ = 0;
  logic [31:0] q [$];

  link_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_i(in), .pop_i(pop), .head_o(head), .credit_o(credit));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: push at cycle t, head valid at t+1
    @(negedge clk);
    in = '{valid: 1'b1, kind: TK_DATA, data: 32'h1234};
    checks++;
    if (head.valid) begin failures++; $display("FAIL head valid before push"); end
    @(negedge clk);
    in = '0;
    checks++;
    if (!(head.valid && head.data == 32'h1234)) begin failures++; $display("FAIL head after one cycle"); end
    pop = 1;
    @(negedge clk);
    pop = 0;
    credits = DEPTH;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic do_push;
      // sender: push when holding a credit
      do_push = (credits > 0) && ($urandom % 3 != 0);
      in = '0;
      if (do_push) begin
        in = '{valid: 1'b1, kind: tok_kind_e'($urandom % 3), data: $urandom};
        q.push_back({in.kind, in.data[29:0]});
        credits--;
      end
      pop = ($urandom % 2 == 0);
      #1;
      if (pop && head.valid) begin
        logic [31:0] e;
        e = q.pop_front();
        checks++;
        if ({head.kind, head.data[29:0]} != e) begin
          failures++;
          $display("FAIL order: got %h exp %h", {head.kind, head.data[29:0]}, e);
        end
        n_pop++;
        occ--;
      end
      checks++;
      if (credit != (pop && head.valid)) begin failures++; $display("FAIL credit pulse"); end
      if (credit) begin credits++; n_credit++; end
      @(negedge clk);
      if (do_push) occ++;
      if (occ > max_occ) max_occ = occ;
    end
    checks++;
    if (max_occ != DEPTH) begin failures++; $display("FAIL max occupancy %0d", max_occ); end
    checks++;
    if (n_credit != n_pop) begin failures++; $display("FAIL credits %0d pops %0d", n_credit, n_pop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
