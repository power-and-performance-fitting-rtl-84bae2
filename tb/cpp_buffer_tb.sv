// cpp_buffer_tb: checks the critical path prediction buffer at its default
// size (4K entries, 6-bit counters, +8 / -1, threshold 8, 8 lookup and 8
// update ports) against a behavioural table kept in the testbench.
//   * the clearing walk lasts exactly ENTRIES cycles and predicts nothing
//     critical meanwhile;
//   * directed: one critical event gives 8 (not above the threshold), two
//     give 16 (critical); saturation at 63 and at 0;
//   * random: updates on all ports, with PCs that alias in the table and
//     several ports hitting the same entry in one cycle, every lookup
//     compared with the model.
module cpp_buffer_tb;
  localparam int ENTRIES = 4096;
  localparam int RP = 8, WP = 8;

  logic clk = 1'b0, rst_n;
  logic [RP-1:0][31:0] rd_pc;
  logic [RP-1:0]       rd_crit;
  logic [RP-1:0][5:0]  rd_ctr;
  logic [WP-1:0]       upd_valid;
  logic [WP-1:0][31:0] upd_pc;
  logic [WP-1:0]       upd_crit;
  logic                init_busy;
  int checks = 0, failures = 0;
  int model [ENTRIES];

  always #5 clk = ~clk;

  cpp_buffer dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(logic [31:0] pc);
    return int'(pc[13:2]);
  endfunction

  // PCs from a small pool so that entries are hit repeatedly; the upper bits
  // vary so that different PCs alias onto one entry.
  function automatic logic [31:0] pick_pc();
    logic [31:0] pc;
    pc = {$urandom_range(0, 3) == 0 ? 18'($urandom) : 18'h0, 12'($urandom_range(0, 23)), 2'b00};
    return pc;
  endfunction

  task automatic step_model();
    for (int j = 0; j < WP; j++) begin
      if (upd_valid[j]) begin
        int e = idx(upd_pc[j]);
        if (upd_crit[j]) model[e] = (model[e] + 8 > 63) ? 63 : model[e] + 8;
        else             model[e] = (model[e] == 0) ? 0 : model[e] - 1;
      end
    end
  endtask

  task automatic check_lookups();
    for (int i = 0; i < RP; i++) begin
      checks++;
      if (int'(rd_ctr[i]) != model[idx(rd_pc[i])] || rd_crit[i] != (model[idx(rd_pc[i])] > 8)) begin
        failures++;
        $display("pc %h: ctr %0d crit %b, expected %0d", rd_pc[i], rd_ctr[i], rd_crit[i], model[idx(rd_pc[i])]);
      end
    end
  endtask

  int init_cycles;

  initial begin
    foreach (model[e]) model[e] = 0;
    rst_n = 1'b0; upd_valid = '0; upd_pc = '0; upd_crit = '0;
    for (int i = 0; i < RP; i++) rd_pc[i] = 32'(i * 4);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // clearing walk: duration and no critical prediction meanwhile
    init_cycles = 0;
    forever begin
      @(negedge clk);
      if (!init_busy) break;
      upd_valid = '1;          // must be ignored while clearing
      upd_crit  = '1;
      checks++;
      if (rd_crit != '0) begin failures++; $display("critical prediction during clearing"); end
      init_cycles++;
    end
    checks++;
    if (init_cycles != ENTRIES) begin
      failures++;
      $display("clearing took %0d cycles, expected %0d", init_cycles, ENTRIES);
    end
    upd_valid = '0;
    upd_crit  = '0;
    #1 check_lookups();

    // directed: one PC, port 0
    rd_pc[0] = 32'h0000_1040;
    upd_pc[0] = 32'h0000_1040;
    upd_crit[0] = 1'b1; upd_valid[0] = 1'b1;
    @(negedge clk); step_model();
    upd_valid = '0;
    #1 checks++;
    if (rd_ctr[0] != 6'd8 || rd_crit[0]) begin failures++; $display("after one critical: %0d %b", rd_ctr[0], rd_crit[0]); end
    upd_valid[0] = 1'b1;
    @(negedge clk); step_model();
    upd_valid = '0;
    #1 checks++;
    if (rd_ctr[0] != 6'd16 || !rd_crit[0]) begin failures++; $display("after two critical: %0d %b", rd_ctr[0], rd_crit[0]); end
    // six more critical events in one cycle through all ports: saturate at 63
    for (int j = 0; j < WP; j++) begin upd_valid[j] = 1'b1; upd_pc[j] = 32'h0000_1040; upd_crit[j] = 1'b1; end
    @(negedge clk); step_model();
    upd_valid = '0;
    #1 checks++;
    if (rd_ctr[0] != 6'd63) begin failures++; $display("saturation high: %0d", rd_ctr[0]); end
    // 70 non-critical events: down to 0 and stays there
    upd_crit = '0;
    for (int n = 0; n < 9; n++) begin
      upd_valid = '1;
      @(negedge clk); step_model();
    end
    upd_valid = '0;
    #1 checks++;
    if (rd_ctr[0] != 6'd0 || rd_crit[0]) begin failures++; $display("saturation low: %0d", rd_ctr[0]); end
    // mixed ports on one entry in one cycle: +8 -1 -1 +8 = 14
    upd_valid = 8'b0000_1111;
    upd_crit  = 8'b0000_1001;
    @(negedge clk); step_model();
    upd_valid = '0;
    #1 checks++;
    if (rd_ctr[0] != 6'd14) begin failures++; $display("mixed same-cycle updates: %0d", rd_ctr[0]); end

    // random
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < RP; i++) rd_pc[i] = pick_pc();
      #1 check_lookups();
      for (int j = 0; j < WP; j++) begin
        upd_valid[j] = ($urandom_range(0, 2) != 0);
        upd_pc[j]    = pick_pc();
        upd_crit[j]  = ($urandom_range(0, 3) == 0);
      end
      @(posedge clk);
      step_model();
      #1 upd_valid = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
