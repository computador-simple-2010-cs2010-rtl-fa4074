// Self-checking testbench of the MDR: every W, I/O* combination of the
// control table with random data on both sides, checking what the register
// holds and which side it drives.
module tb_cs_mdr;
  logic       clk = 0, rst, w, io_n, ib_drive, eb_drive;
  logic [7:0] ib_in, ib_out, eb_in, eb_out;
  logic [7:0] model;
  int         checks = 0, failures = 0;

  cs_mdr #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; w = 0; io_n = 0; ib_in = 0; eb_in = 0;
    @(negedge clk);
    rst = 0;
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      w = 1'($urandom); io_n = 1'($urandom); ib_in = 8'($urandom); eb_in = 8'($urandom);
      #1;
      checks++;
      if (ib_drive !== (!w && io_n) || eb_drive !== (!w && !io_n)) begin
        failures++;
        $display("FAIL drive W=%b I/O*=%b: IB %b EB %b", w, io_n, ib_drive, eb_drive);
      end
      @(negedge clk);
      if (w) model = io_n ? eb_in : ib_in;
      checks++;
      if (ib_out !== model || eb_out !== model) begin
        failures++;
        $display("FAIL MDR = %02h, expected %02h", ib_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
