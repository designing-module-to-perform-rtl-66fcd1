// tb_lbc_its: checks the instruction toggling switch. After reset opcodes
// go to the core's decoder; each FFFFh flips the route from the next
// opcode on and reaches neither side; the unselected side sees NOP (0000h)
// with valid low; cycles without a valid opcode change nothing. Random
// streams are checked against a one-bit model.
module tb_lbc_its;
  import lbc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0;
  opcode_t instr = '0;
  logic id_valid, lbc_valid, lbc_mode;
  opcode_t id_opcode, lbc_opcode;
  logic model;

  lbc_its dut (.*);

  always #5 clk = ~clk;

  task automatic drive_check(logic v, opcode_t op);
    logic tog;
    instr_valid = v; instr = op;
    #1;
    tog = v && (op == 16'hFFFF);
    checks++;
    if (lbc_mode !== model ||
        id_valid  !== (v && !tog && !model) || lbc_valid !== (v && !tog && model) ||
        id_opcode  !== ((v && !tog && !model) ? op : 16'h0000) ||
        lbc_opcode !== ((v && !tog &&  model) ? op : 16'h0000)) begin
      failures++;
      $display("FAIL op=%h v=%b model=%b: mode=%b id=%b/%h lbc=%b/%h", op, v, model,
               lbc_mode, id_valid, id_opcode, lbc_valid, lbc_opcode);
    end
    @(posedge clk); #1;
    if (tog) model = !model;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    drive_check(1, 16'h0C01);   // an AVR instruction
    drive_check(1, 16'hFFFF);   // TOGGL
    drive_check(1, 16'hDD00);   // goes to the cipher module
    drive_check(0, 16'hFFFF);   // not valid: no toggle
    drive_check(1, 16'hDD91);
    drive_check(1, 16'hFFFF);
    drive_check(1, 16'hDD10);   // back at the core's decoder
    checks++;
    if (lbc_mode !== 1'b0) begin failures++; $display("FAIL mode after two toggles"); end
    for (int i = 0; i < 1000; i++)
      drive_check(1'($urandom % 8 != 0), ($urandom % 5 == 0) ? 16'hFFFF : 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
