// tb_tlb_multitask - multiprogramming workload on the controller at its
// default sizes. NT tasks run round robin with a context switch every Q
// translations; each task walks its own working set of pages. The evaluation
// this design comes from used SPEC95 traces with a switch every million
// instructions; those traces are not available here, so the address streams
// are synthetic. Checks:
//   - every PA is correct (in the environment model);
//   - phase A (working set <= one bank): from the second round on, every
//     translation hits except the first one after each switch, which must
//     fetch the ASID and is always reported as a miss - the banks keep each
//     task's translations across context switches;
//   - phase B (working set > one bank, sequential sweep): prefetch-buffer hits
//     occur and the miss rate is printed.
module tb_tlb_multitask;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic VA_req, VA_ack, PTE_req, PTE_ack, clr_TLB_req, clr_TLB_data, clr_TLB_ack;
  logic ASID_req, ASID_ack, CMW_req, CMW_data, CMW_ack, PA_req, PA_ack;
  logic PFE_req, PFE_data, PFE_ack, TLB_hit_req, TLB_hit_data, TLB_hit_ack;
  logic [31:0] VA_data, PTE_data, PA_data;
  logic [4:0]  ASID_data;
  logic [16:0] PFE_vpn;

  tlb_ctrl_top dut (.*);
  tlb_env env (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int c_pb_hit = 0;
  always @(posedge clk) if (rst_n && dut.pb_take) c_pb_hit++;

  localparam int NT = 8;     // tasks
  localparam int Q  = 40;    // translations per time slice
  localparam int WS = 24;    // phase A working set, pages per task

  initial begin
    logic h;
    int   exp_miss, got_miss, va0, m0, pb0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    env.start(5'd0);
    // phase A: 4 rounds over 8 tasks, working set of 24 pages each
    for (int round = 0; round < 4; round++) begin
      for (int t = 0; t < NT; t++) begin
        if (!(round == 0 && t == 0)) env.ctx_switch(5'(t));
        got_miss = 0;
        for (int q = 0; q < Q; q++) begin
          logic [16:0] vpn;
          vpn = 17'(t * 1000 + (q * 7) % WS * 3);
          env.translate({vpn, 15'($urandom)}, h);
          if (round > 0) begin
            chk(h == (q != 0), $sformatf("round %0d task %0d access %0d hit=%b", round, t, q, h));
          end
        end
      end
    end
    // phase B: sequential sweep over 64 pages per task
    va0 = env.n_va; m0 = env.n_miss; pb0 = c_pb_hit;
    for (int round = 0; round < 3; round++) begin
      for (int t = 0; t < NT; t++) begin
        env.ctx_switch(5'(t));
        for (int q = 0; q < 64; q++) begin
          env.translate({17'(20000 + t * 500 + q), 15'($urandom)}, h);
        end
      end
    end
    chk(c_pb_hit > pb0, "prefetch-buffer hits in the sequential sweep");
    $display("phase B: %0d translations, %0d misses (rate %f), %0d prefetch-buffer hits",
             env.n_va - va0, env.n_miss - m0, real'(env.n_miss - m0) / real'(env.n_va - va0), c_pb_hit - pb0);
    checks += env.checks; failures += env.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
