// tb_am2901_ram - writes random words at random B addresses and checks both
// read ports against a model array, including that a word written in a
// cycle is seen only after the clock edge and that we = 0 writes nothing.
module tb_am2901_ram;
  logic       clk = 0, we;
  logic [3:0] a_addr, b_addr, wdata, a_data, b_data;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  am2901_ram dut (.clk, .a_addr, .b_addr, .we, .wdata, .a_data, .b_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0;
    // fill every word first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; b_addr = 4'(i); wdata = 4'($urandom); a_addr = 0;
      model[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); a_addr = 4'($urandom); b_addr = 4'($urandom); wdata = 4'($urandom);
      #1;
      checks++;
      if (a_data !== model[a_addr] || b_data !== model[b_addr]) begin
        failures++;
        $display("FAIL read a[%0d]=%h exp %h b[%0d]=%h exp %h", a_addr, a_data,
                 model[a_addr], b_addr, b_data, model[b_addr]);
      end
      @(posedge clk);
      if (we) model[b_addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
