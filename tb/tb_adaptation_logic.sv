// tb_adaptation_logic: drives random and structured bit sequences into the
// adaptation logic and compares the step and interval it computes for every
// bit with the reference table model.
module tb_adaptation_logic;
  import ansdm_ref_pkg::*;

  logic clk = 0, rst_n = 0, update = 0, b_new = 0;
  logic [11:0] k_next;
  logic [7:0]  tau_next, tau_cur;
  int checks = 0, failures = 0;
  ref_state_t st;
  int k_used;
  int seen_kmax = 0, seen_taumax = 0, seen_taumin = 0;

  adaptation_logic dut (.clk, .rst_n, .clk_en(1'b1), .update, .b_new, .k_next, .tau_next, .tau_cur);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(bit b);
    ref_state_t prev;
    prev = st;
    @(negedge clk);
    b_new = b; update = 1;
    #1;
    ref_step(st, b, k_used);
    checks += 2;
    if (k_next !== 12'(k_used)) begin
      failures++; $display("step mismatch: bits %b%b%b flags %b%b dut %0d ref %0d", prev.b2, prev.b1, b, prev.kf, prev.tf, k_next, k_used);
    end
    if (tau_next !== 8'(st.tau)) begin
      failures++; $display("interval mismatch: bits %b%b%b dut %0d ref %0d", prev.b2, prev.b1, b, tau_next, st.tau);
    end
    if (k_used == KMAX) seen_kmax++;
    if (st.tau == TAU_MAX) seen_taumax++;
    if (st.tau == TAU_MIN) seen_taumin++;
    @(negedge clk);
    update = 0;
    checks++;
    if (tau_cur !== 8'(st.tau)) begin failures++; $display("tau_cur mismatch"); end
  endtask

  initial begin
    st = ref_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // long runs: step grows to KMAX, interval shrinks to TAU_MIN
    repeat (14) push(1);
    repeat (14) push(0);
    // alternation: interval grows to TAU_MAX
    for (int i = 0; i < 12; i++) push(i[0]);
    // other patterns
    push(1); push(1); push(0); push(0); push(1);
    // random
    for (int i = 0; i < 3000; i++) push($urandom_range(0, 1));
    // update held low: state must not move
    repeat (5) @(negedge clk);
    checks++;
    if (tau_cur !== 8'(st.tau)) begin failures++; $display("state moved without update"); end
    checks++;
    if (seen_kmax == 0 || seen_taumax == 0 || seen_taumin == 0) begin
      failures++; $display("limits not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
