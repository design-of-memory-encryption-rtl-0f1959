// key_manager: holds the 128-bit keys of the chip and makes new ones from the
// TRNG.
//
// Three keys are kept: the current and the previous key of the secure memory
// controller and the key of the secure on-chip storage. A generation request
// (gen_req pulse with gen_target: 0 = memory key, 1 = storage key) collects
// 128 fresh TRNG bits, one per rbit_valid, and installs them; for the memory
// key the current key first moves to mem_key_prev (kept so that data still
// under the old key can be re-encrypted). A key may instead be loaded from
// outside the chip (ext_load with ext_target and ext_key). done pulses when a
// key has been installed; busy is high while bits are being collected. The
// three keys and the TRNG source follow the design; the bit-serial
// collection and the handshake are this design's choices.
module key_manager (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gen_req,
  input  logic         gen_target,
  input  logic         ext_load,
  input  logic         ext_target,
  input  logic [127:0] ext_key,
  input  logic         rbit,
  input  logic         rbit_valid,
  output logic [127:0] mem_key,
  output logic [127:0] mem_key_prev,
  output logic [127:0] store_key,
  output logic         mem_key_valid,
  output logic         store_key_valid,
  output logic         busy,
  output logic         done
);
  logic [127:0] acc_q;
  logic [7:0]   cnt_q;
  logic         tgt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_key <= '0; mem_key_prev <= '0; store_key <= '0; mem_key_valid <= 1'b0; store_key_valid <= 1'b0;
      busy <= 1'b0; done <= 1'b0; acc_q <= '0; cnt_q <= '0; tgt_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && ext_load) begin
        if (ext_target) begin store_key <= ext_key; store_key_valid <= 1'b1; end
        else begin mem_key_prev <= mem_key; mem_key <= ext_key; mem_key_valid <= 1'b1; end
        done <= 1'b1;
      end else if (!busy && gen_req) begin
        busy  <= 1'b1;
        tgt_q <= gen_target;
        cnt_q <= '0;
      end else if (busy && rbit_valid) begin
        acc_q <= {acc_q[126:0], rbit};
        cnt_q <= cnt_q + 8'd1;
        if (cnt_q == 8'd127) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (tgt_q) begin store_key <= {acc_q[126:0], rbit}; store_key_valid <= 1'b1; end
          else begin
            mem_key_prev  <= mem_key;
            mem_key       <= {acc_q[126:0], rbit};
            mem_key_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
