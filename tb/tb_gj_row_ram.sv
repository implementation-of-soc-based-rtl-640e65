// tb_gj_row_ram: writes every word through port B, reads them back through port A with a
// one-cycle latency, and checks read-before-write when both ports address the same word.
// The dual-port organisation follows the original core; the read-before-write behaviour is
// this design's own.
module tb_gj_row_ram;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 27;
  logic [4:0]  addra = '0, addrb = '0;
  logic [31:0] qa, db = '0;
  logic        web = 0;

  gj_row_ram dut (.clk(clk), .addra(addra), .qa(qa), .web(web), .addrb(addrb), .db(db));

  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      web = 1; addrb = 5'(i); db = model[i];
      @(negedge clk);
    end
    web = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addra = 5'(DEPTH - 1 - i);
      @(negedge clk);
      checks++;
      if (qa !== model[DEPTH - 1 - i]) begin failures++; $display("FAIL read %0d", DEPTH-1-i); end
    end
    // simultaneous read and write of word 5: old data is read, new data is stored
    addra = 5'd5; addrb = 5'd5; web = 1; db = 32'hdead_beef;
    @(negedge clk);
    web = 0;
    checks++;
    if (qa !== model[5]) begin failures++; $display("FAIL read-first"); end
    @(negedge clk);
    checks++;
    if (qa !== 32'hdead_beef) begin failures++; $display("FAIL write through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
