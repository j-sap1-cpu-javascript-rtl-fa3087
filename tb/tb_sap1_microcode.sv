// tb_sap1_microcode: programs the microcode store with the fetch steps and
// the LDA instruction through the manual port and checks the control word
// for each instruction/step address, the manual/microcode control-word
// select, the manual address select and clearing.
module tb_sap1_microcode;
  import sap1_pkg::*;
  logic clk = 1'b0;
  logic enable, manual_sel, store, clear;
  logic [3:0] opcode;
  logic [2:0] step;
  logic [6:0] manual_addr;
  control_word_t manual_value, manual_cw, word, cw;
  logic [7:0] addr;
  int checks = 0, failures = 0;
  logic [15:0] model [128];

  sap1_microcode dut (.*);
  always #5 clk = ~clk;

  // control lines as bits: HLT=15 ... FI=0
  localparam logic [15:0] MI = 16'h4000, RO = 16'h1000, IO = 16'h0800, II = 16'h0400,
                          AI = 16'h0200, CE = 16'h0008, CO = 16'h0004;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_word(int a, logic [15:0] w);
    @(negedge clk) begin manual_sel = 1; manual_addr = 7'(a); manual_value = w; store = 1; end
    @(negedge clk) store = 0;
    model[a] = w;
  endtask

  task automatic check_all(bit en);
    for (int op = 0; op < 16; op++)
      for (int s = 0; s < 8; s++) begin
        opcode = 4'(op); step = 3'(s); manual_sel = 0; manual_cw = 16'($urandom); enable = en;
        #1;
        checks++;
        if (addr !== {1'b0, 4'(op), 3'(s)} || word !== model[op*8+s] ||
            cw !== (en ? model[op*8+s] : manual_cw)) begin
          failures++; $display("FAIL op %0d step %0d addr %h word %h", op, s, addr, word);
        end
      end
  endtask

  initial begin
    enable = 0; manual_sel = 0; store = 0; clear = 0; opcode = 0; step = 0;
    manual_addr = 0; manual_value = 0; manual_cw = 0;
    foreach (model[i]) model[i] = 16'h0;
    @(negedge clk);
    check_all(1);            // starts empty
    // NOP: fetch only; LDA: fetch, IO|MI, RO|AI (addresses 0b0000xxx, 0b0001xxx)
    program_word(32'b0000_0000, MI | CO);
    program_word(32'b0000_0001, RO | II | CE);
    program_word(32'b0000_1000, MI | CO);
    program_word(32'b0000_1001, RO | II | CE);
    program_word(32'b0000_1010, MI | IO);
    program_word(32'b0000_1011, RO | AI);
    // a few random words elsewhere
    for (int k = 0; k < 20; k++) program_word(16 + ($urandom % 112), 16'($urandom));
    check_all(1);
    check_all(0);
    // the LDA execute rows, by control-line name
    opcode = OP_LDA; step = 3'd2; enable = 1; manual_sel = 0; #1;
    checks++; if (!(cw.mi && cw.io) || cw.ro || cw.ai) failures++;
    step = 3'd3; #1;
    checks++; if (!(cw.ro && cw.ai) || cw.mi) failures++;
    // manual address select shows the word at the manual address
    @(negedge clk) begin manual_sel = 1; manual_addr = 7'd9; end
    #1 checks++; if (addr !== 8'd9 || word !== (RO | II | CE)) failures++;
    // store without manual select writes the current instruction/step address
    @(negedge clk) begin manual_sel = 0; opcode = 4'd5; step = 3'd4; manual_value = 16'h8001; store = 1; end
    @(negedge clk) store = 0;
    model[5*8+4] = 16'h8001;
    check_all(1);
    // clear
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    foreach (model[i]) model[i] = 16'h0;
    check_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
