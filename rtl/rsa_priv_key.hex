9af99fffab5d2e80f9a23fecca2bcdc2dee58082386b97fd6015d20b5ca3b034c305ef1491d3368062198501259c26e58f8b11534bc8d7a918d9dcfbd075278d33743f7897a0f0282a11eff344d567d36b3277e4eb0e891d361e5d889579d077cbd47cf97a24edb4bac2e408de697e08a6701e1e301f47a1cb51a0875af0b497
5989f3671860fd97debecd1eb245eb93e68574a1cd62e94eacc050c216e6c22a9564bb4860e0c6a1d64306c84c702b659cc8563be947bbb126f4bc8afc618f55650538cd556b4dbf8db5d0f204724dec5513e3d7c3277228673ff99822c9f65539db1bd08e3322e50593703806ed29330b743b9d1b175fda2a0a738630fa2819
