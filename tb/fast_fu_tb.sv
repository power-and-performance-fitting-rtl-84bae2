// fast_fu_tb: drives random integer operations into one fast unit, with
// random gaps, and checks that each result appears exactly one cycle after
// issue with the right tag and value (independent reference model).
module fast_fu_tb;
  import fu_pkg::*;
  import alu_ref_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  fu_req_t in_req;
  logic    in_ready;
  fu_res_t res;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  fast_fu dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic    exp_valid;
  fu_req_t exp_req;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_req = '0; exp_valid = 1'b0; exp_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // result of what was presented in the previous cycle
      checks++;
      if (res.valid !== exp_valid) begin
        failures++;
        $display("cycle %0d: valid %b expected %b", n, res.valid, exp_valid);
      end else if (exp_valid) begin
        checks++;
        if (res.tag !== exp_req.tag || res.value !== ref_alu(exp_req.op, exp_req.a, exp_req.b)) begin
          failures++;
          $display("op %s a=%h b=%h: got %h expected %h", exp_req.op.name(), exp_req.a,
                   exp_req.b, res.value, ref_alu(exp_req.op, exp_req.a, exp_req.b));
        end
      end
      checks++;
      if (in_ready !== 1'b1) failures++;
      in_valid = ($urandom_range(0, 3) != 0);
      in_req   = rand_req(6'(n));
      exp_valid = in_valid;
      exp_req   = in_req;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
