// tb_tx_pattern_ram: random writes through the CPU port, then reads on the
// CPU port and both sequencer ports, each checked one clock later against a
// model array; includes overwrites and a read of a word written the clock
// before.
module tb_tx_pattern_ram;
  import stbc_pkg::*;
  localparam int D = 64;

  logic clk = 0;
  always #5 clk = ~clk;
  logic cpu_we = 0, cpu_re = 0;
  logic [5:0] cpu_addr = '0, a_addr = '0, b_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  cplx_t a_data, b_data;
  tx_pattern_ram #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [D];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < D; k++) begin
      @(negedge clk) cpu_we = 1; cpu_addr = 6'(k); cpu_wdata = $urandom; model[k] = cpu_wdata;
    end
    for (int t = 0; t < 300; t++) begin
      automatic int ca = $urandom % D, aa = $urandom % D, ba = $urandom % D;
      @(negedge clk);
      cpu_we = ($urandom % 4 == 0); cpu_re = !cpu_we;
      cpu_addr = 6'(ca); cpu_wdata = $urandom; a_addr = 6'(aa); b_addr = 6'(ba);
      if (cpu_we) begin
        automatic logic [31:0] old_a = model[aa], old_b = model[ba];
        model[ca] = cpu_wdata;
        @(negedge clk) cpu_we = 0;
        // reads in the write clock see the old word
        check(a_data == old_a && b_data == old_b, "read during write");
      end else begin
        @(negedge clk) cpu_re = 0;
        check(cpu_rdata == model[ca], $sformatf("cpu read %0d", ca));
        check(a_data == model[aa], $sformatf("port a %0d", aa));
        check(b_data == model[ba], $sformatf("port b %0d", ba));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
