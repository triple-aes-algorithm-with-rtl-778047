# Triple AES with gray-coded keys

This design protects a 128-bit data block with AES-128 applied three times
under two keys, in the encrypt-decrypt-encrypt (EDE) arrangement familiar
from Triple DES:

    ciphertext = E_key1( D_key2( E_key1(plaintext) ) )
    plaintext  = D_key1( E_key2( D_key1(ciphertext) ) )

On top of that, the keys are handed from the sending side to the receiving
side in gray code: the sender converts each binary key to gray code, the
receiver converts it back before use. The gray coding is a fixed, public
transform. It hides nothing from someone who knows it is there.

The S-boxes of AES are not stored tables. Each one computes the
multiplicative inverse in GF(2^8) with logic and then applies the AES affine
map.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). A
sender and receiver pair, `triple_aes_gray`, is the top level.

## Structure

```
triple_aes_gray                      top: sender and receiver back to back
├── triple_aes_encrypt               E(key1) -> D(key2) -> E(key1), gray-codes the keys
│   ├── aes_encrypt  x2              iterative AES-128 encryption
│   ├── aes_decrypt  x1              iterative AES-128 decryption
│   └── gray_encoder x2              binary -> gray, 128 bits
└── triple_aes_decrypt               gray -> binary, then D(key1) -> E(key2) -> D(key1)
    ├── gray_decoder x2
    ├── aes_decrypt  x2
    └── aes_encrypt  x1

aes_encrypt = key_expansion + sub_bytes + shift_rows + mix_columns + add_round_key
aes_decrypt = key_expansion + inv_sub_bytes + inv_shift_rows + inv_mix_columns (x2) + add_round_key
sub_bytes / inv_sub_bytes = 16 x sbox / inv_sbox;  key_expansion uses 4 x sbox
aes_pkg  = block types and GF(2^8) functions (xtime, multiply, square, inverse, affine maps)
```

Each of the six AES engines is a complete AES-128 unit with its own key
schedule. The three stages of one triple unit run one after the other.

## The AES engines

### Data layout

A block is `logic [127:0]` with bits [127:120] as byte 0, the first byte of
the AES standard. The 4x4 state is filled column by column, so state byte
(row r, column c) is byte r + 4c. With this layout the standard's test
vectors can be used as 128-bit hex literals without reordering.

### Encryption (`aes_encrypt`)

One round datapath is reused for all rounds, one round per clock:

1. **Initial round:** the text is XORed with round key 0, which is the cipher key.
2. **Rounds 1 to 9:** SubBytes, ShiftRows, MixColumns, then AddRoundKey with key r.
3. **Round 10:** the same without MixColumns, using key 10. A multiplexer bypasses `mix_columns`.

### Decryption (`aes_decrypt`)

Each round runs InvSubBytes, InvShiftRows, InvMixColumns and then
AddRoundKey, the mirror image of the encryption round. That order only
undoes encryption if two conditions hold:

- the round keys are used last to first;
- the keys of rounds 1 to 9 are first passed through InvMixColumns.

This is the standard's "equivalent inverse cipher". InvMixColumns is linear,
so it can be moved in front of the key addition if the key is transformed
too. A second `inv_mix_columns` instance transforms the selected round key
on the fly:

    initial:        s = ct ^ rk[10]
    round r = 1..9: s = IMC(ISR(ISB(s))) ^ IMC(rk[10-r])
    round 10:       s = ISR(ISB(s)) ^ rk[0]

### Key expansion (`key_expansion`)

The cipher key's 4 words are expanded into 44 words, which make 11 round
keys, using the standard AES-128 schedule (RotWord, SubWord, Rcon). One
round key is produced per clock, and all 11 are kept in a 11 x 128-bit
register file. The decryption engine needs key 10 first, so the keys cannot
simply be generated alongside the rounds. Rcon is not stored: it starts at
01 and is doubled in GF(2^8) each step (01, 02, ..., 80, 1b, 36).

### S-box logic (`sbox`, `inv_sbox`, `aes_pkg`)

The S-box is `affine(x^-1)` and its inverse is `(inv_affine(x))^-1`. The
field inverse is computed as x^254 with an addition chain:

    x^2 -> x^3 = x^2*x -> x^12 -> x^15 = x^12*x^3 -> x^240 -> x^252 = x^240*x^12 -> x^254 = x^252*x^2

This takes four general GF(2^8) multipliers. The multiplier is a carry-less
8x8 product followed by reduction modulo 0x11b. There are also seven
squarings, which are linear over GF(2) and so are small XOR networks. Zero
maps to zero, as AES requires. A composite-field (GF((2^4)^2)) inverter
would be smaller. This form was chosen because it is easy to check against
the definition.

## Timing and handshake

Every unit uses the same interface:

- A one-cycle `start` samples the inputs into registers. The inputs may change afterwards.
- `busy` stays high until the operation ends. A `start` while busy is ignored.
- `done` pulses for one cycle. The outputs then hold until the next `start`.
- `rst_n` is an active-low asynchronous reset.

| unit | start to done |
|---|---|
| `key_expansion` | 10 cycles (`ready` then stays high) |
| `aes_encrypt`, `aes_decrypt` | 21 cycles: 10 key expansion + 1 initial round + 10 rounds |
| `triple_aes_encrypt`, `triple_aes_decrypt` | 66 cycles: 1 input register + 3 x (21 + 1 for the hand-over) |
| `triple_aes_gray` | `cipher_valid` after 66 cycles, `done` after 133 |

The engines compute the key schedule again on every start. A unit that keeps
the same key for many blocks could skip this step, saving 10 of the 21
cycles. This design does not do that.

## Where the gray code sits

The choice here is that the AES engines on both sides use the binary keys.
The gray code is the form in which the keys leave the sender
(`gray_key1`, `gray_key2` outputs of `triple_aes_encrypt` and of the top)
and enter the receiver. The receiver's `gray_decoder` converts them back.

This matters because two other readings of the source description break the
round trip:

- The sender's AES could use the gray-coded key.
- The receiver's AES could use the gray-decoded key.

If both held at once, the two sides would use different AES keys and the
text would not come back. To move the gray code into the sender's
encryption path, change `triple_aes_encrypt` and `triple_aes_decrypt`
together so that both engines see the same key.

Gray conversion acts on the whole 128-bit key as one number:

- encoding is `g = b ^ (b >> 1)`;
- decoding is a prefix XOR from the top bit down.

## Other choices made in this design

- **Two keys.** Only two keys are used. The third stage of each triple unit reuses key1. A three-key variant would need a `key3` port and a third gray coder.
- **Decryption chain.** The receiver runs decrypt, encrypt, decrypt (D-E-D). This is the order that inverts E-D-E.
- **Top-level chaining.** The top connects sender and receiver back to back. This makes one complete operation end with `plaintext_out == plaintext_in`. In a real link the two halves would sit at different ends and be used separately. Both are ordinary modules with their own ports.
- **Area.** Area was not optimised. Six AES engines, each with 20 S-boxes and an 11-key store, come to about 11k flip-flops and 20k word-level cells before mapping. A single shared engine, sequenced three times, would cut the logic by roughly six at three times the latency per unit.

## Verification

Each module in `rtl/` except the package and the two S-box helpers has a
self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The S-boxes are tested
exhaustively through `tb_sub_bytes` and `tb_inv_sub_bytes`.

The reference model is `tb/aes_ref_pkg.sv`, written independently of the
RTL:

- Its S-box table is built by searching for each byte's field inverse, not by the x^254 chain.
- Its decryption uses the standard's direct inverse cipher, not the equivalent one.

The testbenches check against this model and against known answers from
the AES standard (FIPS-197):

- Appendix A.1: key schedule.
- Appendix B: one encryption traced round by round, used for ShiftRows, MixColumns and the full cipher.
- Appendix C.1: AES-128 known answer.

With key1 = key2 the triple operation reduces to one AES encryption. The
triple-level testbenches use this to check the C.1 answer end to end.

The testbenches also check:

- all latencies in the table above;
- that `done` is a one-cycle pulse;
- that inputs may change after `start`;
- that a `start` while busy is ignored.

`tb_triple_aes_gray` exercises the top at its only configuration. It counts
each mechanism and fails if one never occurs:

- triple encryption;
- gray coding of the keys;
- gray decoding with recovery of the text;
- the equal-key case;
- an ignored request.

To simulate with Verilator 5, for example the top:

    verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
        tb/tb_triple_aes_gray.sv --top-module tb_triple_aes_gray
    ./obj_dir/Vtb_triple_aes_gray

Each testbench calls `aes_ref_pkg::build_tables()` once before using the
model. The triple-level and top testbenches build in under a minute and run
in well under a second.

## Limits

- Nothing here has been checked against side-channel leakage. The source
  design is motivated by resistance to differential power and
  electromagnetic analysis, but plain AES logic like this gives no such
  protection. Masking or hiding would have to be added.
- The gray coding of the keys is an invertible public transform. It is not
  encryption in the cryptographic sense.
- Only AES-128 is implemented: 128-bit key, 10 rounds.
