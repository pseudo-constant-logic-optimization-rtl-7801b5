// Self-checking test of pc_bitfile_store: fills the memory with random words
// through the host port, then reads them back in random order and checks
// that each word appears exactly one clock after its read request, and that
// the output holds while rd_en is low.
module tb_pc_bitfile_store;
  localparam int DEPTH = 64, WIDTH = 22;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             wr_en, rd_en;
  logic [5:0]       wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [DEPTH];

  pc_bitfile_store #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .wr_en, .wr_addr, .wr_data,
                                                        .rd_en, .rd_addr, .rd_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = WIDTH'($urandom); model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      int ad;
      ad = $urandom_range(DEPTH - 1);
      rd_en = 1; rd_addr = 6'(ad);
      @(negedge clk);
      rd_en = 0; rd_addr = 6'($urandom);
      checks++;
      if (rd_data !== model[ad]) begin failures++; $display("FAIL addr %0d", ad); end
      @(negedge clk);
      checks++;
      if (rd_data !== model[ad]) begin failures++; $display("FAIL hold addr %0d", ad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
