// tb_cc_eeprom: self-checking test of the byte-wide program memory.
//
// Checks that unwritten bytes read as the erased value 0xFF, writes a
// pattern through the programming port, and reads it back checking the
// one-clock read latency: the byte appears exactly one clock after its
// address. A watchdog ends the run if it hangs.
module tb_cc_eeprom;
  logic       clk = 0;
  logic       wr_en = 0;
  logic [7:0] wr_addr = 0, wr_data = 0, rd_addr = 0;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;

  cc_eeprom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(int i);
    return 8'((i * 37 + 11) ^ (i >> 3));
  endfunction

  task automatic expect_byte(logic [7:0] want, string what);
    checks++;
    if (rd_data !== want) begin
      failures++;
      $display("%s: got %02h want %02h", what, rd_data, want);
    end
  endtask

  initial begin
    // erased state
    for (int i = 0; i < 256; i += 17) begin
      @(negedge clk) rd_addr = 8'(i);
      @(negedge clk) expect_byte(8'hFF, "erased");
    end
    // program every other byte
    for (int i = 0; i < 256; i += 2) begin
      @(negedge clk) begin wr_en = 1; wr_addr = 8'(i); wr_data = pat(i); end
    end
    @(negedge clk) wr_en = 0;
    // read back: address at one negedge, data valid after the next posedge
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) rd_addr = 8'(i);
      @(posedge clk); #1;
      expect_byte((i % 2 == 0) ? pat(i) : 8'hFF, "readback");
    end
    // latency: data must not change before the clock edge
    @(negedge clk) rd_addr = 8'd2;
    @(negedge clk) rd_addr = 8'd4;
    #1 expect_byte(pat(2), "latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
