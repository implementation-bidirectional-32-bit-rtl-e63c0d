// tb_control_memory: self-checking test of the control memory.
// Directed cases: a write to a free outlet is taken, a second caller to the same outlet
// is refused (busy), two same-clock writes to one outlet give it to port 0, and
// read-with-clear frees the outlet. Then random writes, reads and clears are compared
// with a reference model, including the wr_ok flags.
module tb_control_memory;
  import switching_pkg::*;
  logic clk = 0, rst = 1;
  logic       wr_en [2];
  logic [3:0] wr_addr [2];
  cm_entry_t  wr_data [2];
  logic       wr_ok [2];
  logic [3:0] rd_addr;
  logic       rd_clr;
  cm_entry_t  rd_data;
  cm_entry_t  model [16];
  int checks = 0, failures = 0;

  control_memory #(.N(16), .N_WR(2)) dut (.clk, .rst, .wr_en, .wr_addr, .wr_data, .wr_ok,
                                          .rd_addr, .rd_clr, .rd_data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cm_entry_t entry(input bit ex, input int loc);
    return '{valid: 1'b1, src_ex: ex, src_loc: 4'(loc)};
  endfunction

  // Apply one clock of writes/clear, checking wr_ok and updating the model.
  task automatic step();
    bit ok_exp [2];
    #1;
    for (int p = 0; p < 2; p++) begin
      ok_exp[p] = wr_en[p] && !model[wr_addr[p]].valid;
      if (p == 1 && wr_en[0] && wr_addr[0] == wr_addr[1]) ok_exp[p] = 0;
      check(wr_ok[p] === ok_exp[p], $sformatf("wr_ok[%0d]=%0b exp %0b", p, wr_ok[p], ok_exp[p]));
    end
    check(rd_data === model[rd_addr], $sformatf("rd %0d got %h exp %h", rd_addr, rd_data, model[rd_addr]));
    @(posedge clk);
    if (rd_clr) model[rd_addr].valid = 1'b0;
    for (int p = 0; p < 2; p++) if (ok_exp[p]) model[wr_addr[p]] = wr_data[p];
    @(negedge clk);
  endtask

  task automatic idle();
    wr_en[0] = 0; wr_en[1] = 0; rd_clr = 0;
  endtask

  initial begin
    idle(); rd_addr = 0;
    foreach (wr_addr[p]) begin wr_addr[p] = 0; wr_data[p] = '0; end
    repeat (2) @(posedge clk);
    rst = 0; foreach (model[i]) model[i] = '0;
    @(negedge clk);
    // Free outlet 6 takes a caller from exchange 0, location 0.
    wr_en[0] = 1; wr_addr[0] = 6; wr_data[0] = entry(0, 0); step(); idle();
    rd_addr = 6; #1;
    check(rd_data === entry(0, 0), "outlet 6 holds exchange 0 location 0");
    // Busy: a later caller to outlet 6 is refused.
    wr_en[1] = 1; wr_addr[1] = 6; wr_data[1] = entry(1, 3); #1;
    check(wr_ok[1] === 0, "busy outlet refuses a second caller");
    step(); idle();
    // Same clock, same free outlet: port 0 wins.
    wr_en[0] = 1; wr_addr[0] = 9; wr_data[0] = entry(0, 4);
    wr_en[1] = 1; wr_addr[1] = 9; wr_data[1] = entry(1, 7); #1;
    check(wr_ok[0] && !wr_ok[1], "port 0 wins a same-clock tie");
    step(); idle();
    rd_addr = 9; #1; check(rd_data === entry(0, 4), "tie result kept");
    // Read with clear frees the outlet.
    rd_clr = 1; rd_addr = 6; step(); idle();
    rd_addr = 6; #1; check(!rd_data.valid, "clear on read frees outlet 6");
    // Random traffic.
    repeat (600) begin
      for (int p = 0; p < 2; p++) begin
        wr_en[p] = $urandom_range(0, 2) == 0;
        wr_addr[p] = 4'($urandom);
        wr_data[p] = entry(1'(p), $urandom_range(0, 15));
      end
      rd_addr = 4'($urandom); rd_clr = $urandom_range(0, 2) == 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
