// tb_afb_coef_mem: unit test of the coefficient memory.
//
// Writes random words into a 20-word memory with 2 read ports of 3 words,
// then reads every base address on both ports and compares each word with
// the testbench's copy (zero past the end). A second write pass overwrites
// half of the words to check that writes take effect.
module tb_afb_coef_mem;
  localparam int WORDS = 20, CW = 16, NPORT = 2, MAXP = 3, AW = 5;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic signed [CW-1:0] wdata = '0;
  logic [AW-1:0] raddr [NPORT];
  logic signed [CW-1:0] rdata [NPORT][MAXP];
  int ref_mem [WORDS];
  int checks = 0, failures = 0;

  afb_coef_mem #(.WORDS(WORDS), .COEF_W(CW), .NPORT(NPORT), .MAXP(MAXP), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_pass(int stride);
    for (int i = 0; i < WORDS; i += stride) begin
      ref_mem[i] = int'($urandom_range(65535)) - 32768;
      we = 1'b1; waddr = AW'(i); wdata = CW'(ref_mem[i]);
      @(negedge clk);
    end
    we = 1'b0;
  endtask

  task automatic read_pass();
    for (int base = 0; base < WORDS; base++) begin
      raddr[0] = AW'(base);
      raddr[1] = AW'(WORDS - 1 - base);
      #1;
      for (int p = 0; p < NPORT; p++)
        for (int j = 0; j < MAXP; j++) begin
          int ad, e;
          ad = int'(raddr[p]) + j;
          e  = (ad < WORDS) ? ref_mem[ad] : 0;
          checks++;
          if (int'(rdata[p][j]) != e) begin
            failures++;
            $display("FAIL port %0d addr %0d: %0d exp %0d", p, ad, rdata[p][j], e);
          end
        end
    end
  endtask

  initial begin
    @(negedge clk);
    write_pass(1);
    read_pass();
    write_pass(2);
    read_pass();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
