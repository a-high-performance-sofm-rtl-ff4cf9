// vme_ctrl: the VME-bus controller, a slave interface of the board.
//
// It serves byte (D8) cycles in one A24 window selected by BASE (address
// bits 23:16). Window offsets 0x0000-0x7FFF reach the dual-port SRAM through
// its port A (the lower AW bits are the SRAM address; the bus data lines go
// straight to the SRAM write data); offset 0x8000 is the control/status
// register and a write to 0x8001 clears the interrupt.
//   write 0x8000: bits 2:0 job opcode (sofm_pkg::ctrl_op_e), bit 7 start
//   read  0x8000: bit 7 busy, bit 6 interrupt pending, bits 2:0 last opcode
// A job end (done from the NBISOM controller) sets the interrupt, signalled
// on the active-low vme_irq_n until cleared.
//
// Bus timing: AS* and DS* are asynchronous and pass two synchronizing flip
// flops; address, data and WRITE* are taken while the synchronized strobes
// are low, which VME guarantees to be stable. DTACK* goes low two or three
// cycles later (one more for an SRAM read, which has one cycle of latency)
// and stays low, with read data driven, until DS* rises. A new cycle is only
// accepted after AS* and DS* have been seen high (synchronized), also after a
// cycle addressed to another board, so the bus master must hold them high for
// at least three clock cycles between cycles (VME's strobe high time).
//
// The paper gives only the controller's task (the VME-bus communication and
// the interrupt); the register map, the D8/A24 subset and the handshake
// implementation are this design's.
module vme_ctrl
  import sofm_pkg::*;
#(
  parameter logic [7:0]  BASE = 8'h40,
  parameter int unsigned AW   = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // VME bus (slave, D8, A24)
  input  logic [23:0]       vme_addr,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [7:0]        vme_din,
  output logic [7:0]        vme_dout,
  output logic              vme_dout_oe,
  output logic              vme_dtack_n,
  output logic              vme_irq_n,
  // dual-port SRAM, port A
  output logic              a_en,
  output logic              a_we,
  output logic [AW-1:0]     a_addr,
  output logic [7:0]        a_wdata,
  input  logic [7:0]        a_rdata,
  // NBISOM controller
  output logic              start,
  output ctrl_op_e          op,
  input  logic              busy,
  input  logic              done
);

  typedef enum logic [1:0] {V_IDLE, V_RWAIT, V_ACK, V_SKIP} vstate_e;

  vstate_e    state;
  logic [1:0] as_sync, ds_sync;
  logic       irq;
  logic [7:0] dout_q;
  logic       rd_q;
  logic       sel, strobe;

  assign strobe  = !as_sync[1] && !ds_sync[1];
  assign sel     = (vme_addr[23:16] == BASE);
  assign a_addr  = vme_addr[AW-1:0];
  assign a_wdata = vme_din;
  assign a_en    = (state == V_IDLE) && strobe && sel && !vme_addr[15];
  assign a_we    = !vme_write_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= 2'b11;
      ds_sync <= 2'b11;
      state   <= V_IDLE;
      irq     <= 1'b0;
      dout_q  <= '0;
      rd_q    <= 1'b0;
      start   <= 1'b0;
      op      <= OP_NONE;
    end else begin
      as_sync <= {as_sync[0], vme_as_n};
      ds_sync <= {ds_sync[0], vme_ds_n};
      start   <= 1'b0;
      if (done) irq <= 1'b1;
      unique case (state)
        V_IDLE: if (strobe && !sel) begin
          state <= V_SKIP;
        end else if (strobe) begin
          rd_q <= vme_write_n;
          if (!vme_addr[15]) begin
            state <= vme_write_n ? V_RWAIT : V_ACK;
          end else begin
            state <= V_ACK;
            if (!vme_write_n) begin
              if (!vme_addr[0]) begin
                op    <= ctrl_op_e'(vme_din[2:0]);
                start <= vme_din[7] && !busy;
              end else begin
                irq <= 1'b0;
              end
            end else begin
              dout_q <= {busy, irq, 3'b000, op};
            end
          end
        end
        V_RWAIT: begin
          dout_q <= a_rdata;
          state  <= V_ACK;
        end
        V_ACK, V_SKIP: if (ds_sync[1] && as_sync[1]) state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end

  assign vme_dtack_n = !(state == V_ACK);
  assign vme_dout    = dout_q;
  assign vme_dout_oe = (state == V_ACK) && rd_q;
  assign vme_irq_n   = !irq;

  // A job start is only issued to an idle controller.
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
