// tb_data_memory: self-checking test of the data memory.
// Writes the 16 locations in order (as the scan phase does), then reads them back at
// random addresses on both read ports, and repeats with random writes mixed in, comparing
// with a reference array. Also checks that reset clears every location.
module tb_data_memory;
  import switching_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] waddr, raddr [2];
  dm_word_t   wdata, rdata [2];
  dm_word_t   model [16];
  int checks = 0, failures = 0;

  data_memory #(.N(16), .N_RD(2)) dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (rdata[p] !== model[raddr[p]]) begin
        failures++;
        $display("FAIL port %0d addr %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
      end
    end
  endtask

  initial begin
    waddr = 0; wdata = '0; raddr[0] = 0; raddr[1] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      raddr[0] = 4'(a); raddr[1] = 4'(15 - a); #1; check_reads();
    end
    // Sequential write of all locations.
    for (int a = 0; a < 16; a++) begin
      we = 1; waddr = 4'(a); wdata = dm_word_t'($urandom);
      @(posedge clk); model[a] = wdata; @(negedge clk);
    end
    we = 0;
    repeat (64) begin
      raddr[0] = 4'($urandom); raddr[1] = 4'($urandom); #1; check_reads();
    end
    // Random writes with reads.
    repeat (300) begin
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = dm_word_t'($urandom);
      raddr[0] = 4'($urandom); raddr[1] = 4'($urandom);
      @(posedge clk); if (we) model[waddr] = wdata;
      @(negedge clk); check_reads();
    end
    we = 0; rst = 1; @(posedge clk); @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int a = 0; a < 16; a++) begin
      raddr[0] = 4'(a); raddr[1] = 4'(a); #1; check_reads();
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
