// tb_callerid_memory: self-checking test of the caller-ID memory.
// Random writes to the source and destination halves, random reads on both source read
// ports and a check of all 16 destination entries every clock, against reference arrays;
// reset must clear both halves.
module tb_callerid_memory;
  logic clk = 0, rst = 1;
  logic       src_we, dst_we;
  logic [3:0] src_addr, dst_addr, src_id, dst_id;
  logic [3:0] src_raddr [2], src_rid [2];
  logic [3:0] dst_ids [16];
  logic [3:0] m_src [16], m_dst [16];
  int checks = 0, failures = 0;

  callerid_memory #(.N(16), .N_RD(2)) dut (.clk, .rst, .src_we, .src_addr, .src_id,
    .src_raddr, .src_rid, .dst_we, .dst_addr, .dst_id, .dst_ids);

  always #5 clk = ~clk;

  task automatic compare();
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (src_rid[p] !== m_src[src_raddr[p]]) begin
        failures++;
        $display("FAIL src port %0d addr %0d got %0d exp %0d", p, src_raddr[p], src_rid[p], m_src[src_raddr[p]]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (dst_ids[i] !== m_dst[i]) begin
        failures++;
        $display("FAIL dst %0d got %0d exp %0d", i, dst_ids[i], m_dst[i]);
      end
    end
  endtask

  initial begin
    src_we = 0; dst_we = 0; src_addr = 0; dst_addr = 0; src_id = 0; dst_id = 0;
    src_raddr[0] = 0; src_raddr[1] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    foreach (m_src[i]) begin m_src[i] = 0; m_dst[i] = 0; end
    @(negedge clk); compare();
    repeat (400) begin
      src_we = $urandom_range(0, 1); dst_we = $urandom_range(0, 1);
      src_addr = 4'($urandom); dst_addr = 4'($urandom);
      src_id = 4'($urandom); dst_id = 4'($urandom);
      src_raddr[0] = 4'($urandom); src_raddr[1] = 4'($urandom);
      @(posedge clk);
      if (src_we) m_src[src_addr] = src_id;
      if (dst_we) m_dst[dst_addr] = dst_id;
      @(negedge clk); compare();
    end
    src_we = 0; dst_we = 0; rst = 1; @(posedge clk); @(negedge clk); rst = 0;
    foreach (m_src[i]) begin m_src[i] = 0; m_dst[i] = 0; end
    for (int a = 0; a < 16; a++) begin
      src_raddr[0] = 4'(a); src_raddr[1] = 4'(15 - a); #1; compare();
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
