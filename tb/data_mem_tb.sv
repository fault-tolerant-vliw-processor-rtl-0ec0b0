// data_mem_tb: host writes, then random three-port read/write traffic
// against a reference array, including same-word write conflicts (highest
// port wins) and host reads.
module data_mem_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] we;
  logic [2:0][9:0] addr;
  word_t [2:0] wdata, rdata;
  logic host_we;
  logic [9:0] host_addr;
  word_t host_wdata, host_rdata;
  word_t model [1024];
  data_mem dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; addr = '0; wdata = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); host_we = 1; host_addr = 10'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    repeat (2000) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        we[p] = 1'($urandom); addr[p] = 10'($urandom % 16); wdata[p] = $urandom;
      end
      host_addr = 10'($urandom % 16);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== model[addr[p]]) begin failures++; $display("FAIL rd port %0d", p); end
      end
      checks++;
      if (host_rdata !== model[host_addr]) failures++;
      @(posedge clk);
      for (int p = 0; p < 3; p++) if (we[p]) model[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
