// tb_qp_wbu: self-checking test of the write-back unit: random results,
// memory data and control words; the written value must be the memory data
// exactly when mem_to_reg is set, and the write enable must follow
// reg_write.
module tb_qp_wbu;
  import qp_pkg::*;
  word_t WBU_I_Result, WBU_I_ReadDataFromMem, WBU_O_WriteDataToReg;
  raddr_t WBU_I_DstAddress, WBU_O_DstAddress;
  ctrl_wb_t WBU_I_ControlWB;
  logic WBU_O_RegWrite;
  int checks = 0, failures = 0;

  qp_wbu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      WBU_I_Result = $urandom; WBU_I_ReadDataFromMem = $urandom;
      WBU_I_DstAddress = 6'($urandom); WBU_I_ControlWB = 2'(i);
      #1;
      checks++;
      if (WBU_O_WriteDataToReg != (i[0] ? WBU_I_ReadDataFromMem : WBU_I_Result) ||
          WBU_O_RegWrite != i[1] || WBU_O_DstAddress != WBU_I_DstAddress) begin
        failures++; $display("FAIL case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
