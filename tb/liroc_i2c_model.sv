// liroc_i2c_model: behavioural model of the LIROC slow-control I2C slave,
// for testbenches.
//
// The 7-bit I2C address is {CHIP_ID, frame}: frame 0 carries the low byte
// of the 16-bit register address, frame 1 the high byte, frame 2 the data
// (written with R/W = 0, returned with R/W = 1). The 16-bit address packs
// the 11-bit register address and 5-bit sub-address as
// {addr[10:3], addr[2:0], sub[4:0]}. Registers are kept in an associative
// array, unwritten ones read as 0. A frame with another chip ID is not
// acknowledged. Open-drain lines are given as levels: scl, sda (line) in;
// sda_pull out (1 pulls SDA low).
module liroc_i2c_model #(
  parameter logic [3:0] CHIP_ID = 4'h5
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull
);
  logic [7:0]  regs [int];
  logic [15:0] ladd = 0;
  int unsigned n_writes = 0, n_reads = 0;

  typedef enum {IDLE, ADDR, ACK_A, WDATA, ACK_W, RDATA, ACK_R} st_e;
  st_e st = IDLE;
  logic [7:0] sh;
  int bitn;
  logic [2:0] frame;
  logic rnw;

  initial sda_pull = 1'b0;

  // START / STOP detection
  always @(negedge sda) if (scl) begin st = ADDR; bitn = 0; sda_pull = 1'b0; end
  always @(posedge sda) if (scl) begin st = IDLE; sda_pull = 1'b0; end

  always @(posedge scl) begin
    case (st)
      ADDR: begin
        sh = {sh[6:0], sda}; bitn++;
        if (bitn == 8) begin
          frame = sh[3:1]; rnw = sh[0];
          st = (sh[7:4] == CHIP_ID && frame <= 3'd2) ? ACK_A : IDLE;
        end
      end
      WDATA: begin
        sh = {sh[6:0], sda}; bitn++;
        if (bitn == 8) begin
          case (frame)
            3'd0: ladd[7:0]  = sh;
            3'd1: ladd[15:8] = sh;
            default: begin regs[int'(ladd)] = sh; n_writes++; end
          endcase
          st = ACK_W;
        end
      end
      ACK_R: begin
        // master ACK (0) asks for more; NACK ends the read
        st = sda ? IDLE : RDATA;
        bitn = -1;                   // next falling edge drives bit 7
        if (!sda) sh = regs.exists(int'(ladd)) ? regs[int'(ladd)] : 8'h00;
      end
      default: ;
    endcase
  end

  always @(negedge scl) begin
    case (st)
      ACK_A: begin
        if (sda_pull == 1'b0 && bitn == 8) begin
          sda_pull = 1'b1;           // acknowledge the address
          bitn = 9;
        end else begin
          sda_pull = 1'b0;
          bitn = 0;
          if (rnw) begin
            sh = regs.exists(int'(ladd)) ? regs[int'(ladd)] : 8'h00;
            n_reads++;
            st = RDATA;
            sda_pull = !sh[7];
          end else st = WDATA;
        end
      end
      ACK_W: begin
        if (bitn == 8) begin sda_pull = 1'b1; bitn = 9; end
        else begin sda_pull = 1'b0; st = IDLE; end
      end
      RDATA: begin
        bitn++;
        if (bitn == 0) sda_pull = !sh[7];
        else if (bitn < 8) sda_pull = !sh[7 - bitn];
        else begin sda_pull = 1'b0; st = ACK_R; end
      end
      default: sda_pull = 1'b0;
    endcase
  end

endmodule
